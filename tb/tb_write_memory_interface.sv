// tb_write_memory_interface: self-checking test of write_memory_interface.
//
// Sends clean and dirty evictions. For a dirty one the block must read the
// victim line from the data array (served here after a random delay), then
// offer it to memory at {old tag, index, 0} and hold it stable under random
// wb_ready stalls; a clean one must finish without any memory write. Checks
// done_o is a single pulse carrying the victim way and the write-back flag.
module tb_write_memory_interface;
  localparam int WAYS = 8, IW = 4, TW = 48 - IW - 5, LB = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [IW-1:0] index; logic evict_valid; logic [2:0] evict_way; logic [TW-1:0] evict_tag; logic evict_dirty;
  logic line_rd; logic [2:0] line_way; logic line_valid; logic [LB-1:0] line;
  logic wb_valid, wb_ready; logic [47:0] wb_addr; logic [LB-1:0] wb_data;
  logic done; logic [2:0] done_way; logic wrote_back;
  int checks = 0, failures = 0, writes = 0, stalls = 0;

  write_memory_interface #(.WAYS(WAYS), .INDEX_WIDTH(IW)) dut (
    .clk, .rst_n, .index_i(index), .evict_valid_i(evict_valid), .evict_way_i(evict_way),
    .evict_tag_i(evict_tag), .evict_dirty_i(evict_dirty), .line_rd_o(line_rd), .line_way_o(line_way),
    .line_valid_i(line_valid), .line_i(line), .wb_valid_o(wb_valid), .wb_ready_i(wb_ready),
    .wb_addr_o(wb_addr), .wb_data_o(wb_data), .done_o(done), .done_way_o(done_way), .wrote_back_o(wrote_back));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [LB-1:0] line_of(input logic [IW-1:0] i, input logic [2:0] w);
    return {8{24'hA5A5A5, 1'b0, i, w}};
  endfunction

  initial begin
    index = 0; evict_valid = 0; evict_way = 0; evict_tag = 0; evict_dirty = 0;
    line_valid = 0; line = 0; wb_ready = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [2:0] w; logic [TW-1:0] t; bit d; int cyc, dones, wbs;
      w = 3'($urandom); t = TW'({$urandom, $urandom}); d = $urandom_range(0, 1);
      index = IW'($urandom);
      evict_valid = 1; evict_way = w; evict_tag = t; evict_dirty = d;
      @(negedge clk);
      evict_valid = 0; evict_tag = '0;
      dones = 0; wbs = 0;
      for (cyc = 0; cyc < 40 && dones == 0; cyc++) begin
        wb_ready = ($urandom_range(0, 2) == 0);
        line_valid = 0;
        if (line_rd) begin
          check(d, "line read only for a dirty victim");
          check(line_way == w, "line read from the victim way");
          fork begin
            automatic logic [IW-1:0] i = index;
            repeat ($urandom_range(1, 3)) @(negedge clk);
            line_valid = 1; line = line_of(i, w);
          end join_none
        end
        if (wb_valid) begin
          check(wb_addr == {t, index, 5'b0}, "write-back address");
          check(wb_data == line_of(index, w), "write-back data");
          if (wb_ready) wbs++; else stalls++;
        end
        if (done) begin
          dones++;
          check(done_way == w && wrote_back == d, "done way and write-back flag");
        end
        @(negedge clk);
        line_valid = 0;
      end
      check(dones == 1, "exactly one done");
      check(wbs == (d ? 1 : 0), $sformatf("write-backs %0d for dirty=%0d", wbs, d));
      writes += wbs;
      @(negedge clk);
      check(!done && !wb_valid, "idle again");
    end
    check(writes > 0 && stalls > 0, "write-backs and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
