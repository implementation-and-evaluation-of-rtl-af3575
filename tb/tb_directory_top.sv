// tb_directory_top: self-checking test of directory_top.
//
// Installs tags into random sets and ways, marks some lines dirty, and reads
// sets back, comparing tags (of installed ways), valid and dirty bits with a
// model. Checks that both directories answer in the same cycle (one cycle
// after rd_en_i) and that an install writes the tag and makes the line valid
// and clean together.
module tb_directory_top;
  localparam int WAYS = 8, IW = 3, TW = 24, SETS = 1 << IW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, inst_en, dirty_en; logic [IW-1:0] rd_index, inst_index, dirty_index;
  logic [2:0] inst_way, dirty_way; logic [TW-1:0] inst_tag;
  logic [WAYS-1:0][TW-1:0] tags; logic [WAYS-1:0] valid, dirty;
  logic [TW-1:0] mt [SETS][WAYS]; logic [WAYS-1:0] mv [SETS], md [SETS];
  int checks = 0, failures = 0;

  directory_top #(.WAYS(WAYS), .INDEX_WIDTH(IW), .TAG_WIDTH(TW)) dut (
    .clk, .rst_n, .rd_en_i(rd_en), .rd_index_i(rd_index), .tags_o(tags), .valid_o(valid),
    .dirty_o(dirty), .inst_en_i(inst_en), .inst_index_i(inst_index), .inst_way_i(inst_way),
    .inst_tag_i(inst_tag), .dirty_en_i(dirty_en), .dirty_index_i(dirty_index), .dirty_way_i(dirty_way));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    rd_en = 0; inst_en = 0; dirty_en = 0; rd_index = 0; inst_index = 0; dirty_index = 0;
    inst_way = 0; dirty_way = 0; inst_tag = 0;
    for (int s = 0; s < SETS; s++) begin mv[s] = '0; md[s] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      logic [IW-1:0] ri;
      // install, then mark dirty, then read back, with random ordering gaps
      inst_en = ($urandom_range(0, 1) == 0); inst_index = IW'($urandom); inst_way = 3'($urandom);
      inst_tag = TW'($urandom);
      @(negedge clk);
      if (inst_en) begin
        mt[inst_index][inst_way] = inst_tag; mv[inst_index][inst_way] = 1; md[inst_index][inst_way] = 0;
      end
      inst_en = 0;
      dirty_en = ($urandom_range(0, 2) == 0); dirty_index = inst_index; dirty_way = inst_way;
      if (dirty_en && !mv[dirty_index][dirty_way]) dirty_en = 0;
      @(negedge clk);
      if (dirty_en) md[dirty_index][dirty_way] = 1;
      dirty_en = 0;
      ri = ($urandom_range(0, 1) == 0) ? inst_index : IW'($urandom);
      rd_en = 1; rd_index = ri;
      @(negedge clk);
      rd_en = 0;
      check(valid == mv[ri], $sformatf("valid %b exp %b", valid, mv[ri]));
      check(dirty == md[ri], $sformatf("dirty %b exp %b", dirty, md[ri]));
      for (int w = 0; w < WAYS; w++)
        if (mv[ri][w]) check(tags[w] == mt[ri][w], $sformatf("tag set %0d way %0d", ri, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
