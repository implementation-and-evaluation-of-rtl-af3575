// tb_tag_directory: self-checking test of tag_directory.
//
// Random reads and single-way tag writes (a small 16-set, 8-way directory)
// against an associative model. A read returns the set one cycle later; only
// ways that have been written are compared, since the array has no reset.
// Also checks the read output is zero after reset and that a write and a read
// of the same set in one cycle return the old content.
module tb_tag_directory;
  localparam int WAYS = 8, IW = 4, TW = 20, SETS = 1 << IW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en; logic [IW-1:0] rd_index, wr_index; logic [2:0] wr_way;
  logic [TW-1:0] wr_tag; logic [WAYS-1:0][TW-1:0] tags;
  logic [TW-1:0] model [SETS][WAYS];
  bit written [SETS][WAYS];
  int checks = 0, failures = 0;

  tag_directory #(.WAYS(WAYS), .INDEX_WIDTH(IW), .TAG_WIDTH(TW)) dut (
    .clk, .rst_n, .rd_en_i(rd_en), .rd_index_i(rd_index), .tags_o(tags),
    .wr_en_i(wr_en), .wr_index_i(wr_index), .wr_way_i(wr_way), .wr_tag_i(wr_tag));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; rd_index = 0; wr_index = 0; wr_way = 0; wr_tag = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(tags == '0, "read register cleared by reset");
    for (int n = 0; n < 4000; n++) begin
      logic [TW-1:0] exp_t [WAYS]; bit exp_w [WAYS]; logic [IW-1:0] ri; bit do_rd;
      do_rd = $urandom_range(0, 1); ri = IW'($urandom);
      rd_en = do_rd; rd_index = ri;
      wr_en = $urandom_range(0, 1); wr_index = (n % 7 == 0) ? ri : IW'($urandom);
      wr_way = 3'($urandom); wr_tag = TW'($urandom);
      for (int w = 0; w < WAYS; w++) begin exp_t[w] = model[ri][w]; exp_w[w] = written[ri][w]; end
      @(negedge clk);
      if (wr_en) begin model[wr_index][wr_way] = wr_tag; written[wr_index][wr_way] = 1; end
      if (do_rd)
        for (int w = 0; w < WAYS; w++)
          if (exp_w[w]) check(tags[w] == exp_t[w], $sformatf("set %0d way %0d: %h exp %h", ri, w, tags[w], exp_t[w]));
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
