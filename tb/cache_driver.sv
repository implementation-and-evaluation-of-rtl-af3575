// cache_driver: request generator and checker for end-to-end cache tests.
//
// Not synthesizable. It plays two classes of service (CLOS 0 and 1) taking
// turns in bursts of 50 requests, each in its own address region (bit 40 set
// for CLOS 1) so their lines never alias. Masks are widened in three phases:
// disjoint halves (11110000 / 00001111), overlapping (11111100 / 00111111)
// and full overlap (11111111 / 11111111); since each phase's mask contains
// the previous one, no CLOS ever loses sight of its own lines.
// Checks:
//   * every read returns the last value written to that word (golden memory,
//     backed by mem_model's initial pattern) and every write echoes its data;
//   * a hit responds exactly HIT_LATENCY cycles after acceptance;
//   * a directed sequence shows isolation: a line loaded by CLOS 0 misses for
//     CLOS 1 when their masks are disjoint, and hits for each afterwards;
//   * with LRU_REF set, an independent model of a partitioned true-LRU cache
//     predicts every hit/miss and every write-back.
// Counters of the mechanisms seen are public for the enclosing testbench.
module cache_driver #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 3,
  parameter int N_REQ       = 1500,
  parameter bit LRU_REF     = 0,
  parameter int HIT_LATENCY = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            req_valid,
  input  logic            req_ready,
  output logic            req_write,
  output logic [47:0]     req_addr,
  output logic [63:0]     req_wdata,
  output logic [WAYS-1:0] req_mask,
  output logic [0:0]      req_clos,
  input  logic            resp_valid,
  input  logic [63:0]     resp_rdata,
  input  logic            resp_hit,
  input  logic            wb_fire,
  output logic            done
);
  localparam int SETS   = 1 << INDEX_WIDTH;
  localparam int POOL   = SETS * WAYS * 3 / 4;
  localparam int TAGW   = 48 - INDEX_WIDTH - 5;

  int checks = 0, failures = 0;
  int read_hits = 0, read_misses = 0, write_hits = 0, write_misses = 0;
  int isolation_misses = 0, mask_switches = 0, wb_seen = 0;
  int cyc = 0;

  logic [63:0] gold [logic [44:0]];

  // Partitioned true-LRU reference cache.
  logic [TAGW-1:0] r_tag   [SETS][WAYS];
  bit              r_valid [SETS][WAYS];
  bit              r_dirty [SETS][WAYS];
  int              r_cnt   [SETS][WAYS];

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && wb_fire) wb_seen++;


  function automatic logic [63:0] mem_word(input logic [47:0] a);
    logic [63:0] w;
    w = {16'hC0DE, a[47:5], 1'b0, a[4:3], 2'b00};
    return w;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic void ref_promote(int s, int way, logic [WAYS-1:0] m);
    int c = r_cnt[s][way];
    for (int w = 0; w < WAYS; w++) if (m[w] && r_cnt[s][w] < c) r_cnt[s][w]++;
    r_cnt[s][way] = 0;
  endfunction

  // Returns predicted hit; sets exp_wb when a dirty line must be written back.
  function automatic bit ref_access(logic [47:0] a, bit wr, logic [WAYS-1:0] m, output bit exp_wb);
    int s = int'(a[5 +: INDEX_WIDTH]);
    logic [TAGW-1:0] t = a[47 -: TAGW];
    int way = -1;
    exp_wb = 0;
    for (int w = 0; w < WAYS; w++)
      if (way < 0 && m[w] && r_valid[s][w] && r_tag[s][w] == t) way = w;
    if (way >= 0) begin
      ref_promote(s, way, m);
      if (wr) r_dirty[s][way] = 1;
      return 1;
    end
    for (int w = 0; w < WAYS; w++)
      if (m[w] && (way < 0 || r_cnt[s][w] > r_cnt[s][way])) way = w;
    exp_wb = r_valid[s][way] && r_dirty[s][way];
    r_tag[s][way] = t; r_valid[s][way] = 1; r_dirty[s][way] = wr;
    ref_promote(s, way, m);
    return 0;
  endfunction

  task automatic do_req(input bit wr, input logic [47:0] a, input logic [63:0] d,
                        input logic [WAYS-1:0] m, input bit clos, output bit hit);
    int t0, wb0;
    bit exp_hit, exp_wb;
    logic [63:0] exp_data;
    logic [44:0] wa = a[47:3];
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_wdata = d; req_mask = m; req_clos = clos;
    wb0 = wb_seen;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    t0 = cyc;
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    hit = resp_hit;
    exp_data = wr ? d : (gold.exists(wa) ? gold[wa] : mem_word(a));
    check(resp_rdata == exp_data, $sformatf("data addr=%h got %h exp %h", a, resp_rdata, exp_data));
    if (wr) gold[wa] = d;
    if (hit) check(cyc - t0 == HIT_LATENCY, $sformatf("hit latency %0d", cyc - t0));
    if (LRU_REF) begin
      exp_hit = ref_access(a, wr, m, exp_wb);
      check(hit == exp_hit, $sformatf("hit/miss addr=%h got %0d exp %0d", a, hit, exp_hit));
      check((wb_seen - wb0) == int'(exp_wb), $sformatf("write-back addr=%h got %0d exp %0d", a, wb_seen - wb0, exp_wb));
    end
    if (wr && hit) write_hits++;
    if (wr && !hit) write_misses++;
    if (!wr && hit) read_hits++;
    if (!wr && !hit) read_misses++;
  endtask

  logic [WAYS-1:0] masks [3][2];

  initial begin
    bit h, clos, wr;
    int phase;
    logic [47:0] a;
    masks[0][0] = 8'b1111_0000; masks[0][1] = 8'b0000_1111;
    masks[1][0] = 8'b1111_1100; masks[1][1] = 8'b0011_1111;
    masks[2][0] = 8'b1111_1111; masks[2][1] = 8'b1111_1111;
    req_valid = 0; req_write = 0; req_addr = '0; req_wdata = '0; req_mask = '0; req_clos = '0;
    done = 0;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        r_valid[s][w] = 0; r_dirty[s][w] = 0; r_cnt[s][w] = w; r_tag[s][w] = '0;
      end
    @(posedge rst_n);
    repeat (3) @(posedge clk);

    // Directed isolation sequence on a line outside the random pool.
    a = 48'h0000_00F0_0000 + 48'h28;
    do_req(0, a, '0, masks[0][0], 0, h); check(!h, "isolation: first access must miss");
    do_req(0, a, '0, masks[0][0], 0, h); check(h,  "isolation: second access must hit");
    do_req(0, a, '0, masks[0][1], 1, h); check(!h, "isolation: other CLOS must miss");
    if (!h) isolation_misses++;
    do_req(0, a, '0, masks[0][1], 1, h); check(h,  "isolation: other CLOS hits its own copy");
    do_req(0, a, '0, masks[0][0], 0, h); check(h,  "isolation: first CLOS still hits");

    // Random traffic, 50-request bursts per CLOS, masks widened per phase.
    for (int n = 0; n < N_REQ; n++) begin
      phase = (n * 3) / N_REQ;
      clos  = 1'((n / 50) % 2);
      wr    = ($urandom_range(0, 9) < 3);
      if (n > 0 && ((n * 3) / N_REQ) != (((n - 1) * 3) / N_REQ)) mask_switches++;
      a = {7'b0, clos, 40'(($urandom % POOL) * 32 + $urandom_range(0, 3) * 8)};
      do_req(wr, a, {$urandom, $urandom}, masks[phase][clos], clos, h);
    end
    done = 1;
  end
endmodule
