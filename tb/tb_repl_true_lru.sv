// tb_repl_true_lru: self-checking test of repl_true_lru.
//
// Drives random hits and misses on an 8-set cache (4-bit index not needed:
// INDEX_WIDTH = 3), with both classes of service and the partition masks of
// the evaluation (full, halves, quarters, 2-way, and the overlapping pairs).
// An independent model of the algorithm predicts every victim way.
// Latency is checked in clock cycles from the request pulse.
// The directed part replays Table 3.1 of the recency-stack example.
module tb_repl_true_lru;
  localparam int WAYS = 8, IW = 3, SETS = 1 << IW, NOPS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hit_valid, miss_valid, ready, victim_valid;
  logic [IW-1:0] index;
  logic [0:0] clos;
  logic [WAYS-1:0] mask;
  logic [2:0] hit_way, victim_way;
  int checks = 0, failures = 0;

  repl_true_lru #(.WAYS(WAYS), .INDEX_WIDTH(IW), .NUM_CLOS(2)) dut (
    .clk, .rst_n, .hit_valid_i(hit_valid), .miss_valid_i(miss_valid), .index_i(index),
    .clos_i(clos), .mask_i(mask), .hit_way_i(hit_way), .ready_o(ready),
    .victim_valid_o(victim_valid), .victim_way_o(victim_way));

  logic [WAYS-1:0] masks [10] = '{8'hFF, 8'hF0, 8'h03, 8'h0F, 8'hF8, 8'h1F, 8'hFC, 8'h3F, 8'hFE, 8'h7F};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  int cnt [SETS][WAYS];
  function automatic void model_reset();
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) cnt[s][w] = w;
  endfunction
  function automatic void promote(int s, logic [WAYS-1:0] m, int way);
    int c = cnt[s][way];
    for (int w = 0; w < WAYS; w++) if (m[w] && cnt[s][w] < c) cnt[s][w]++;
    cnt[s][way] = 0;
  endfunction
  function automatic void model_hit(int s, int c, logic [WAYS-1:0] m, int w);
    promote(s, m, w);
  endfunction
  function automatic void model_miss(int s, int c, logic [WAYS-1:0] m, output int way, output int lat);
    way = -1;
    for (int w = 0; w < WAYS; w++) if (m[w] && (way < 0 || cnt[s][w] > cnt[s][way])) way = w;
    promote(s, m, way);
    lat = 2;
  endfunction

  task automatic op(input bit is_miss, input int s, input int c, input logic [WAYS-1:0] m, input int w);
    int lat, exp_way, exp_lat;
    @(negedge clk);
    while (!ready) @(negedge clk);
    index = IW'(s); clos = 1'(c); mask = m; hit_way = 3'(w);
    hit_valid = !is_miss; miss_valid = is_miss;
    @(negedge clk);
    hit_valid = 0; miss_valid = 0;
    if (is_miss) begin
      lat = 1;
      while (!victim_valid && lat < 20) begin @(negedge clk); lat++; end
      model_miss(s, c, m, exp_way, exp_lat);
      check(victim_way == 3'(exp_way), $sformatf("set %0d mask %b: victim %0d exp %0d", s, m, victim_way, exp_way));
      check(lat == exp_lat, $sformatf("victim latency %0d exp %0d", lat, exp_lat));
    end else begin
      model_hit(s, c, m, w);
      lat = 1;
      while (!ready) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("hit update busy %0d cycles", lat));
    end
  endtask

  initial begin
    hit_valid = 0; miss_valid = 0; index = '0; clos = '0; mask = '1; hit_way = '0;
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Table 3.1: build the stack A1 B4 C0 D7 E6 F2 G3 H5 (ways 0..7) in set 5,
    // hit G, expect A2 B4 C1 D7 E6 F3 G0 H5, so the LRU line D (way 3) is the victim.
    begin
      int order [8] = '{3, 4, 7, 1, 6, 5, 0, 2};
      int after [8] = '{2, 4, 1, 7, 6, 3, 0, 5};
      for (int i = 0; i < 8; i++) op(0, 5, 0, 8'hFF, order[i]);
      op(0, 5, 0, 8'hFF, 6);
      for (int w = 0; w < 8; w++) check(cnt[5][w] == after[w], "Table 3.1 stack");
      op(1, 5, 0, 8'hFF, 0);
      check(victim_way == 3'd3, "Table 3.1: LRU line D is the victim");
    end
    for (int n = 0; n < NOPS; n++) begin
      int s, c, w;
      logic [WAYS-1:0] m;
      s = $urandom_range(0, SETS - 1);
      c = $urandom_range(0, 1);
      m = masks[$urandom_range(0, 9)];
      do w = $urandom_range(0, WAYS - 1); while (!m[w]);
      op($urandom_range(0, 1), s, c, m, w);
    end

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
