// tb_repl_drrip: self-checking test of repl_drrip.
//
// Drives random hits and misses on an 8-set cache (4-bit index not needed:
// INDEX_WIDTH = 3), with both classes of service and the partition masks of
// the evaluation (full, halves, quarters, 2-way, and the overlapping pairs).
// An independent model of the algorithm predicts every victim way and its latency (two cycles plus one per ageing step).
// Latency is checked in clock cycles from the request pulse.
// The model includes set dueling, PSEL and the BRRIP insertion bit.
module tb_repl_drrip;
  localparam int WAYS = 8, IW = 3, SETS = 1 << IW, NOPS = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hit_valid, miss_valid, ready, victim_valid;
  logic [IW-1:0] index;
  logic [0:0] clos;
  logic [WAYS-1:0] mask;
  logic [2:0] hit_way, victim_way;
  int checks = 0, failures = 0;

  repl_drrip #(.WAYS(WAYS), .INDEX_WIDTH(IW), .NUM_CLOS(2)) dut (
    .clk, .rst_n, .hit_valid_i(hit_valid), .miss_valid_i(miss_valid), .index_i(index),
    .clos_i(clos), .mask_i(mask), .hit_way_i(hit_way), .ready_o(ready),
    .victim_valid_o(victim_valid), .victim_way_o(victim_way));

  logic [WAYS-1:0] masks [10] = '{8'hFF, 8'hF0, 8'h03, 8'h0F, 8'hF8, 8'h1F, 8'hFC, 8'h3F, 8'hFE, 8'h7F};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  int rrpv [SETS][WAYS];
  int psel, agings = 0, brrip_long = 0;
  logic [3:0] lfsr_m;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr_m <= 4'b0001; else lfsr_m <= {lfsr_m[2:0], lfsr_m[3] ^ lfsr_m[2]};
  function automatic void model_reset();
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) rrpv[s][w] = 0;
    psel = 2;
  endfunction
  // Leader sets at 8 sets: groups of 4, first SRRIP, second BRRIP.
  function automatic int kind(int s); return s % 4; endfunction
  function automatic void model_hit(int s, int c, logic [WAYS-1:0] m, int w);
    rrpv[s][w] = 0;
    if (kind(s) == 0 && psel < 3) psel++;
    if (kind(s) == 1 && psel > 0) psel--;
  endfunction
  function automatic void model_miss(int s, int c, logic [WAYS-1:0] m, output int way, output int lat);
    bit srrip, rnd;
    int mx = 0;
    for (int w = 0; w < WAYS; w++) if (m[w] && rrpv[s][w] > mx) mx = rrpv[s][w];
    for (int w = 0; w < WAYS; w++) if (m[w]) rrpv[s][w] += 3 - mx;
    agings += 3 - mx;
    lat = 2 + (3 - mx);
    way = -1;
    for (int w = WAYS - 1; w >= 0; w--) if (m[w] && rrpv[s][w] == 3) way = w;
    srrip = (kind(s) == 0) || (kind(s) != 1 && psel >= 2);
    rnd = (lfsr_m == 4'b1000);
    if (!srrip && rnd) brrip_long++;
    rrpv[s][way] = (srrip || rnd) ? 2 : 3;
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
    // Worst case: all RRPVs of the partition at 0 after reset: 2*M ageing steps.
    op(1, 3, 0, 8'hF0, 0); check(victim_way == 3'd4, "all-zero set: first way of partition");
    // A hit-only set then a distant line: found immediately (latency 2).
    op(1, 3, 0, 8'h0F, 0);
    for (int n = 0; n < NOPS; n++) begin
      int s, c, w;
      logic [WAYS-1:0] m;
      s = $urandom_range(0, SETS - 1);
      c = $urandom_range(0, 1);
      m = masks[$urandom_range(0, 9)];
      do w = $urandom_range(0, WAYS - 1); while (!m[w]);
      op($urandom_range(0, 1), s, c, m, w);
    end
    check(agings > 0, "ageing exercised");
    check(brrip_long > 0, "BRRIP long insertion exercised");
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
