// tb_repl_random: self-checking test of repl_random.
//
// Keeps its own copy of the free-running counter (cycles since reset, modulo
// 8) and, for random misses with the evaluation's partition masks, predicts
// the victim: the first masked way at or after the sampled counter value.
// Checks the one-cycle victim latency, that hits leave the block ready, and
// that the victim always lies inside the mask.
module tb_repl_random;
  localparam int WAYS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hit_valid, miss_valid, ready, victim_valid;
  logic [2:0] index;
  logic [0:0] clos;
  logic [WAYS-1:0] mask;
  logic [2:0] hit_way, victim_way;
  int checks = 0, failures = 0, cyc = 0;
  logic [WAYS-1:0] masks [10] = '{8'hFF, 8'hF0, 8'h03, 8'h0F, 8'hF8, 8'h1F, 8'hFC, 8'h3F, 8'hFE, 8'h01};
  int seen [WAYS];

  repl_random #(.WAYS(WAYS), .INDEX_WIDTH(3), .NUM_CLOS(2)) dut (
    .clk, .rst_n, .hit_valid_i(hit_valid), .miss_valid_i(miss_valid), .index_i(index),
    .clos_i(clos), .mask_i(mask), .hit_way_i(hit_way), .ready_o(ready),
    .victim_valid_o(victim_valid), .victim_way_o(victim_way));

  always @(posedge clk) if (rst_n) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    hit_valid = 0; miss_valid = 0; index = 0; clos = 0; mask = '1; hit_way = 0;
    for (int w = 0; w < WAYS; w++) seen[w] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int sample, exp_way, gap;
      logic [WAYS-1:0] m;
      m = masks[$urandom_range(0, 9)];
      gap = $urandom_range(0, 5);
      repeat (gap) @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        hit_valid = 1; hit_way = 3'($urandom);
        @(negedge clk);
        hit_valid = 0;
        check(ready && !victim_valid, "hit needs no update");
      end
      mask = m; miss_valid = 1;
      sample = cyc % WAYS;              // counter value sampled at the coming edge
      exp_way = -1;
      for (int i = 0; i < WAYS; i++) if (exp_way < 0 && m[(sample + i) % WAYS]) exp_way = (sample + i) % WAYS;
      @(negedge clk);
      miss_valid = 0;
      check(victim_valid, "victim one cycle after the miss");
      check(victim_way == 3'(exp_way), $sformatf("mask %b sample %0d: victim %0d exp %0d", m, sample, victim_way, exp_way));
      check(m[victim_way], "victim inside mask");
      if (m == 8'hFF) seen[victim_way]++;
    end
    for (int w = 0; w < WAYS; w++) check(seen[w] > 0, $sformatf("way %0d chosen with full mask", w));
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
