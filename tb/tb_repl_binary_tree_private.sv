// tb_repl_binary_tree_private: self-checking test of repl_binary_tree_private.
//
// Drives random hits and misses on an 8-set cache (4-bit index not needed:
// INDEX_WIDTH = 3), with both classes of service and the partition masks of
// the evaluation (full, halves, quarters, 2-way, and the overlapping pairs).
// An independent model of the algorithm predicts every victim way.
// Latency is checked in clock cycles from the request pulse.
// The model keeps one tree per (set, CLOS).
module tb_repl_binary_tree_private;
  localparam int WAYS = 8, IW = 3, SETS = 1 << IW, NOPS = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hit_valid, miss_valid, ready, victim_valid;
  logic [IW-1:0] index;
  logic [0:0] clos;
  logic [WAYS-1:0] mask;
  logic [2:0] hit_way, victim_way;
  int checks = 0, failures = 0;

  repl_binary_tree_private #(.WAYS(WAYS), .INDEX_WIDTH(IW), .NUM_CLOS(2)) dut (
    .clk, .rst_n, .hit_valid_i(hit_valid), .miss_valid_i(miss_valid), .index_i(index),
    .clos_i(clos), .mask_i(mask), .hit_way_i(hit_way), .ready_o(ready),
    .victim_valid_o(victim_valid), .victim_way_o(victim_way));

  logic [WAYS-1:0] masks [10] = '{8'hFF, 8'hF0, 8'h03, 8'h0F, 8'hF8, 8'h1F, 8'hFC, 8'h3F, 8'hFE, 8'h7F};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  bit tree [SETS*2][WAYS-1];
  int forced = 0;
  function automatic void model_reset();
    for (int s = 0; s < SETS*2; s++) for (int n = 0; n < WAYS-1; n++) tree[s][n] = 0;
  endfunction
  function automatic int slot(int s, int c);
    return s * 2 + c;
  endfunction
  // Range walk: node n covers ways [lo, hi); its upper half is [lo, mid).
  function automatic void walk(int t, logic [WAYS-1:0] m, bit victim_mode, int hw, output int way);
    int n = 0, lo = 0, hi = WAYS;
    while (hi - lo > 1) begin
      int mid = (lo + hi) / 2;
      bit any_up = 0, any_lo = 0, go_lower;
      for (int w = lo; w < mid; w++) any_up |= m[w];
      for (int w = mid; w < hi; w++) any_lo |= m[w];
      if (any_up && !any_lo) begin go_lower = 0; forced++; end
      else if (any_lo && !any_up) begin go_lower = 1; forced++; end
      else begin
        go_lower = victim_mode ? tree[t][n] : (hw >= mid);
        tree[t][n] = !go_lower;
      end
      if (go_lower) begin lo = mid; n = 2 * n + 2; end
      else          begin hi = mid; n = 2 * n + 1; end
    end
    way = lo;
  endfunction
  function automatic void model_hit(int s, int c, logic [WAYS-1:0] m, int w);
    int dummy;
    walk(slot(s, c), m, 0, w, dummy);
  endfunction
  function automatic void model_miss(int s, int c, logic [WAYS-1:0] m, output int way, output int lat);
    walk(slot(s, c), m, 1, 0, way);
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
    // Figure 2.4 (4 ways shown; here ways 0-3 of an 8-way set): root 1, its
    // children 0. Touch way 1 (B, MRU) with the ways-0..3 partition: the walk
    // goes down at the first level and up at the second, to way 2 (C, LRU).
    op(0, 6, 0, 8'h0F, 3);
    op(0, 6, 0, 8'h0F, 1);
    op(1, 6, 0, 8'h0F, 0); check(victim_way == 3'd2, "Figure 2.4: victim is way 2");
    // Private trees: CLOS 1 touching set 6 must not disturb CLOS 0's tree.
    op(0, 6, 1, 8'h0F, 2);
    op(0, 6, 1, 8'h0F, 3);
    op(1, 6, 0, 8'h0F, 0); check(victim_way == 3'd0, "private tree: CLOS 0 unaffected by CLOS 1");
    for (int n = 0; n < NOPS; n++) begin
      int s, c, w;
      logic [WAYS-1:0] m;
      s = $urandom_range(0, SETS - 1);
      c = $urandom_range(0, 1);
      m = masks[$urandom_range(0, 9)];
      do w = $urandom_range(0, WAYS - 1); while (!m[w]);
      op($urandom_range(0, 1), s, c, m, w);
    end
    check(forced > 0, "up/down forcing exercised");
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
