// tb_processor_interface: self-checking test of processor_interface.
//
// Issues random requests (read/write, address, mask, CLOS) while the rest of
// the cache is played by the testbench: ready_i is randomly low, and done_i
// comes a random number of cycles after the lookup pulse. Checks the request
// is split into tag/index/word, mask and CLOS are passed on, lookup_o is a
// pulse one cycle after acceptance, no new request is accepted until the
// response, and resp_* appear one cycle after done_i with its data and hit flag.
module tb_processor_interface;
  localparam int WAYS = 8, IW = 8, TW = 48 - IW - 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, req_write; logic [47:0] req_addr; logic [63:0] req_wdata;
  logic [WAYS-1:0] req_mask; logic [0:0] req_clos;
  logic resp_valid, resp_hit; logic [63:0] resp_rdata;
  logic ready, lookup, write, done, done_hit; logic [TW-1:0] tag; logic [IW-1:0] index; logic [1:0] word;
  logic [63:0] wdata, rdata; logic [WAYS-1:0] mask; logic [0:0] clos;
  int checks = 0, failures = 0, blocked = 0;

  processor_interface #(.WAYS(WAYS), .INDEX_WIDTH(IW), .NUM_CLOS(2)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .req_mask, .req_clos,
    .resp_valid, .resp_rdata, .resp_hit, .ready_i(ready), .lookup_o(lookup), .tag_o(tag),
    .index_o(index), .word_o(word), .write_o(write), .wdata_o(wdata), .mask_o(mask), .clos_o(clos),
    .done_i(done), .done_hit_i(done_hit), .rdata_i(rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    req_valid = 0; req_write = 0; req_addr = 0; req_wdata = 0; req_mask = '1; req_clos = 0;
    ready = 1; done = 0; done_hit = 0; rdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [47:0] a; logic [0:0] c; bit wr, h; logic [63:0] d, r; logic [7:0] m; int wait_c;
      a = {$urandom, $urandom}; wr = $urandom_range(0, 1); d = {$urandom, $urandom};
      do m = 8'($urandom); while (m == 0);
      c = 1'($urandom);
      h = $urandom_range(0, 1); r = {$urandom, $urandom};
      req_valid = 1; req_write = wr; req_addr = a; req_wdata = d; req_mask = m; req_clos = c;
      ready = ($urandom_range(0, 3) != 0);
      #1 check(req_ready == ready, "ready follows the cache when idle");
      while (!ready) begin
        @(negedge clk); ready = ($urandom_range(0, 1) == 0); #1;
      end
      @(negedge clk);
      req_valid = 0; req_addr = '0;
      check(lookup, "lookup one cycle after acceptance");
      check(tag == a[47 -: TW] && index == a[5 +: IW] && word == a[4:3], "address split");
      check(write == wr && wdata == d && mask == m && clos == c, "request fields");
      wait_c = $urandom_range(1, 6);
      repeat (wait_c) begin
        @(negedge clk);
        req_valid = 1;
        #1 if (req_ready) check(0, "accepted a request while busy"); else blocked++;
        check(!lookup && !resp_valid, "no second lookup or early response");
        req_valid = 0;
      end
      done = 1; done_hit = h; rdata = r;
      @(negedge clk);
      done = 0; rdata = '0;
      check(resp_valid && resp_hit == h && resp_rdata == r, "response one cycle after done");
    end
    check(blocked > 0, "back-pressure while busy exercised");
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
