// tb_status_bits_directory: self-checking test of status_bits_directory.
//
// Random reads, installs (valid set, dirty cleared) and dirty marks on a
// 16-set, 8-way directory, compared with a bit-array model. Reads return the
// set one cycle later and see the state before any same-cycle update. Checks
// all lines are invalid and clean after reset, and that an install clears a
// previous dirty bit.
module tb_status_bits_directory;
  localparam int WAYS = 8, IW = 4, SETS = 1 << IW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, inst_en, dirty_en; logic [IW-1:0] rd_index, inst_index, dirty_index;
  logic [2:0] inst_way, dirty_way; logic [WAYS-1:0] valid, dirty;
  logic [WAYS-1:0] mv [SETS], md [SETS];
  int checks = 0, failures = 0, reinstalled_dirty = 0;

  status_bits_directory #(.WAYS(WAYS), .INDEX_WIDTH(IW)) dut (
    .clk, .rst_n, .rd_en_i(rd_en), .rd_index_i(rd_index), .valid_o(valid), .dirty_o(dirty),
    .inst_en_i(inst_en), .inst_index_i(inst_index), .inst_way_i(inst_way),
    .dirty_en_i(dirty_en), .dirty_index_i(dirty_index), .dirty_way_i(dirty_way));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    rd_en = 0; inst_en = 0; dirty_en = 0; rd_index = 0; inst_index = 0; dirty_index = 0;
    inst_way = 0; dirty_way = 0;
    for (int s = 0; s < SETS; s++) begin mv[s] = '0; md[s] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < SETS; s++) begin
      rd_en = 1; rd_index = IW'(s);
      @(negedge clk);
      check(valid == '0 && dirty == '0, "invalid and clean after reset");
    end
    for (int n = 0; n < 5000; n++) begin
      logic [WAYS-1:0] ev, ed; bit do_rd;
      do_rd = $urandom_range(0, 1); rd_en = do_rd; rd_index = IW'($urandom);
      inst_en = ($urandom_range(0, 2) == 0); inst_index = IW'($urandom); inst_way = 3'($urandom);
      dirty_en = ($urandom_range(0, 1) == 0); dirty_index = IW'($urandom); dirty_way = 3'($urandom);
      if (dirty_en && inst_en && dirty_index == inst_index && dirty_way == inst_way) dirty_en = 0;
      ev = mv[rd_index]; ed = md[rd_index];
      @(negedge clk);
      if (inst_en) begin
        if (md[inst_index][inst_way]) reinstalled_dirty++;
        mv[inst_index][inst_way] = 1; md[inst_index][inst_way] = 0;
      end
      if (dirty_en) md[dirty_index][dirty_way] = 1;
      if (do_rd) begin
        check(valid == ev, $sformatf("valid %b exp %b", valid, ev));
        check(dirty == ed, $sformatf("dirty %b exp %b", dirty, ed));
      end
    end
    check(reinstalled_dirty > 0, "install over a dirty line exercised");
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
