// tb_workloads: the partitioning workloads of the evaluation, on synthetic
// traces, for every replacement algorithm at 8 KiB (32 sets x 8 ways).
//
// Three kinds of run, each built from workload_runner:
//   * two applications with disjoint partitions split 20/80 (00000011 /
//     11111100), 50/50 (11110000 / 00001111) and 80/20 (11111100 / 00000011),
//     taking turns of 50 requests; each application is also run alone with
//     the same mask;
//   * two applications with overlapping partitions, from 2 to 8 shared ways
//     (11111000/00011111, 11111100/00111111, 11111110/01111111, 11111111/11111111);
//   * one application alone with masks 11111111, 11110000 and 00000011.
// Checks:
//   * every read of every run returns the right data;
//   * isolation: with disjoint partitions, an application's hit and miss
//     counts with its neighbour running equal those of its run alone, for the
//     algorithms whose state is per way or per CLOS (true LRU, NRU, binary
//     tree, binary tree private). Random and DRRIP keep a clock-driven counter
//     or a shared PSEL and LFSR, so their counts are only reported;
//   * true LRU misses never fall when ways are taken away (8 -> 4 -> 2 ways);
//   * every run sees both hits and misses.
// The miss counts are printed as a table per algorithm.
// Follows the document: the masks, splits and overlap levels of the
// evaluation, the 8 KiB size and the six algorithms. Design choices: the
// synthetic traces, the isolation and monotonic-miss checks, and running only
// the 8 KiB point (larger sizes differ only in INDEX_WIDTH).
module tb_workloads;
  import cache_pkg::*;
  localparam int NA = 6, NS = 3, NO = 4, NM = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // masks
  logic [7:0] split_m0 [NS] = '{8'b0000_0011, 8'b1111_0000, 8'b1111_1100};
  logic [7:0] split_m1 [NS] = '{8'b1111_1100, 8'b0000_1111, 8'b0000_0011};
  logic [7:0] ovl_m0   [NO] = '{8'b1111_1000, 8'b1111_1100, 8'b1111_1110, 8'b1111_1111};
  logic [7:0] ovl_m1   [NO] = '{8'b0001_1111, 8'b0011_1111, 8'b0111_1111, 8'b1111_1111};
  logic [7:0] single_m [NM] = '{8'b1111_1111, 8'b1111_0000, 8'b0000_0011};
  string alg_name [NA] = '{"Random", "TrueLRU", "NRU", "BinaryTree", "BTPrivate", "DRRIP"};

  logic done_split [NA][NS][3];
  logic done_ovl [NA][NO];
  logic done_single [NA][NM];

  for (genvar a = 0; a < NA; a++) begin : g_alg
    for (genvar s = 0; s < NS; s++) begin : g_split
      for (genvar m = 0; m < 3; m++) begin : g_mode
        workload_runner #(.REPL(repl_e'(a))) u (
          .clk, .rst_n, .mask0_i(split_m0[s]), .mask1_i(split_m1[s]), .mode_i(2'(m)),
          .done(done_split[a][s][m]));
      end
    end
    for (genvar o = 0; o < NO; o++) begin : g_ovl
      workload_runner #(.REPL(repl_e'(a))) u (
        .clk, .rst_n, .mask0_i(ovl_m0[o]), .mask1_i(ovl_m1[o]), .mode_i(2'd0), .done(done_ovl[a][o]));
    end
    for (genvar m = 0; m < NM; m++) begin : g_single
      workload_runner #(.REPL(repl_e'(a))) u (
        .clk, .rst_n, .mask0_i(single_m[m]), .mask1_i(8'hFF), .mode_i(2'd1), .done(done_single[a][m]));
    end
  end

  function automatic bit all_done();
    for (int a = 0; a < NA; a++) begin
      for (int s = 0; s < NS; s++) for (int m = 0; m < 3; m++) if (!done_split[a][s][m]) return 0;
      for (int o = 0; o < NO; o++) if (!done_ovl[a][o]) return 0;
      for (int m = 0; m < NM; m++) if (!done_single[a][m]) return 0;
    end
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Hierarchical access to the runners' counters, unrolled per algorithm.
`define COLLECT(A) \
    for (int s = 0; s < NS; s++) begin \
      int sh [2], sm [2], ah [2], am [2]; \
      case (s) \
        0: begin sh = g_alg[A].g_split[0].g_mode[0].u.hits; sm = g_alg[A].g_split[0].g_mode[0].u.misses; \
                 ah[0] = g_alg[A].g_split[0].g_mode[1].u.hits[0]; am[0] = g_alg[A].g_split[0].g_mode[1].u.misses[0]; \
                 ah[1] = g_alg[A].g_split[0].g_mode[2].u.hits[1]; am[1] = g_alg[A].g_split[0].g_mode[2].u.misses[1]; end \
        1: begin sh = g_alg[A].g_split[1].g_mode[0].u.hits; sm = g_alg[A].g_split[1].g_mode[0].u.misses; \
                 ah[0] = g_alg[A].g_split[1].g_mode[1].u.hits[0]; am[0] = g_alg[A].g_split[1].g_mode[1].u.misses[0]; \
                 ah[1] = g_alg[A].g_split[1].g_mode[2].u.hits[1]; am[1] = g_alg[A].g_split[1].g_mode[2].u.misses[1]; end \
        default: begin sh = g_alg[A].g_split[2].g_mode[0].u.hits; sm = g_alg[A].g_split[2].g_mode[0].u.misses; \
                 ah[0] = g_alg[A].g_split[2].g_mode[1].u.hits[0]; am[0] = g_alg[A].g_split[2].g_mode[1].u.misses[0]; \
                 ah[1] = g_alg[A].g_split[2].g_mode[2].u.hits[1]; am[1] = g_alg[A].g_split[2].g_mode[2].u.misses[1]; end \
      endcase \
      $display("  %-10s disjoint %s: misses app0 %5d (alone %5d)  app1 %5d (alone %5d)", alg_name[A], \
               s == 0 ? "20/80" : s == 1 ? "50/50" : "80/20", sm[0], am[0], sm[1], am[1]); \
      for (int p = 0; p < 2; p++) begin \
        check(sh[p] > 0 && sm[p] > 0, $sformatf("%s split %0d app %0d sees hits and misses", alg_name[A], s, p)); \
        if (A >= 1 && A <= 4) \
          check(sh[p] == ah[p] && sm[p] == am[p], \
                $sformatf("%s split %0d app %0d isolated: shared %0d/%0d alone %0d/%0d", alg_name[A], s, p, sh[p], sm[p], ah[p], am[p])); \
      end \
    end \
    $display("  %-10s overlap 2/4/6/8 ways: total misses %5d %5d %5d %5d", alg_name[A], \
      g_alg[A].g_ovl[0].u.misses[0] + g_alg[A].g_ovl[0].u.misses[1], g_alg[A].g_ovl[1].u.misses[0] + g_alg[A].g_ovl[1].u.misses[1], \
      g_alg[A].g_ovl[2].u.misses[0] + g_alg[A].g_ovl[2].u.misses[1], g_alg[A].g_ovl[3].u.misses[0] + g_alg[A].g_ovl[3].u.misses[1]); \
    check(g_alg[A].g_ovl[3].u.hits[1] > 0, $sformatf("%s full overlap: hits", alg_name[A])); \
    $display("  %-10s single app, masks 11111111/11110000/00000011: misses %5d %5d %5d", alg_name[A], \
      g_alg[A].g_single[0].u.misses[0], g_alg[A].g_single[1].u.misses[0], g_alg[A].g_single[2].u.misses[0]); \
    if (A == 1) begin \
      check(g_alg[A].g_single[1].u.misses[0] >= g_alg[A].g_single[0].u.misses[0], "TrueLRU: 4 ways miss no less than 8"); \
      check(g_alg[A].g_single[2].u.misses[0] >= g_alg[A].g_single[1].u.misses[0], "TrueLRU: 2 ways miss no less than 4"); \
    end

`define SUM_RUNNER(P) begin checks += P.checks; failures += P.failures; end
`define SUM_ALG(A) \
    for (int k = 0; k < 1; k++) begin \
      `SUM_RUNNER(g_alg[A].g_split[0].g_mode[0].u) `SUM_RUNNER(g_alg[A].g_split[0].g_mode[1].u) `SUM_RUNNER(g_alg[A].g_split[0].g_mode[2].u) \
      `SUM_RUNNER(g_alg[A].g_split[1].g_mode[0].u) `SUM_RUNNER(g_alg[A].g_split[1].g_mode[1].u) `SUM_RUNNER(g_alg[A].g_split[1].g_mode[2].u) \
      `SUM_RUNNER(g_alg[A].g_split[2].g_mode[0].u) `SUM_RUNNER(g_alg[A].g_split[2].g_mode[1].u) `SUM_RUNNER(g_alg[A].g_split[2].g_mode[2].u) \
      `SUM_RUNNER(g_alg[A].g_ovl[0].u) `SUM_RUNNER(g_alg[A].g_ovl[1].u) `SUM_RUNNER(g_alg[A].g_ovl[2].u) `SUM_RUNNER(g_alg[A].g_ovl[3].u) \
      `SUM_RUNNER(g_alg[A].g_single[0].u) `SUM_RUNNER(g_alg[A].g_single[1].u) `SUM_RUNNER(g_alg[A].g_single[2].u) \
    end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    repeat (5) @(posedge clk);
    `SUM_ALG(0) `SUM_ALG(1) `SUM_ALG(2) `SUM_ALG(3) `SUM_ALG(4) `SUM_ALG(5)
    $display("misses counted after warm-up (8 KiB cache):");
    `COLLECT(0)
    `COLLECT(1)
    `COLLECT(2)
    `COLLECT(3)
    `COLLECT(4)
    `COLLECT(5)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
