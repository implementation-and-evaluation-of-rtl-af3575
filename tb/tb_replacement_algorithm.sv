// tb_replacement_algorithm: self-checking test of replacement_algorithm.
//
// Builds the wrapper once per algorithm (the default build, which must be
// true LRU, plus one instance for each REPL value) on 8 sets x 8 ways and
// drives all of them with the same random hits and misses under the
// evaluation's partition masks. For every instance it checks that victims lie
// inside the mask and arrive within the algorithm's latency (1 cycle for
// random, 2 for LRU/NRU/tree, 2 to 5 for DRRIP). For the default build it also
// checks it is true LRU: while every access uses the full mask, touching every
// way in turn makes the first way touched the victim; with mixed masks its
// victims equal those of the explicitly selected true-LRU instance.
module tb_replacement_algorithm;
  import cache_pkg::*;
  localparam int WAYS = 8, IW = 3, NI = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hit_valid, miss_valid; logic [IW-1:0] index; logic [0:0] clos; logic [WAYS-1:0] mask;
  logic [2:0] hit_way;
  logic ready [NI]; logic victim_valid [NI]; logic [2:0] victim_way [NI];
  int min_lat [NI] = '{2, 1, 2, 2, 2, 2, 2};
  int max_lat [NI] = '{2, 1, 2, 2, 2, 2, 5};
  logic [WAYS-1:0] masks [6] = '{8'hFF, 8'hF0, 8'h0F, 8'h03, 8'hFC, 8'h3F};
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t: %s", $time, what); end
  endtask

  replacement_algorithm #(.INDEX_WIDTH(IW)) u_default (
    .clk, .rst_n, .hit_valid_i(hit_valid), .miss_valid_i(miss_valid), .index_i(index), .clos_i(clos),
    .mask_i(mask), .hit_way_i(hit_way), .ready_o(ready[0]), .victim_valid_o(victim_valid[0]),
    .victim_way_o(victim_way[0]));

  for (genvar g = 0; g < 6; g++) begin : g_alg
    replacement_algorithm #(.INDEX_WIDTH(IW), .REPL(repl_e'(g))) u (
      .clk, .rst_n, .hit_valid_i(hit_valid), .miss_valid_i(miss_valid), .index_i(index), .clos_i(clos),
      .mask_i(mask), .hit_way_i(hit_way), .ready_o(ready[g+1]), .victim_valid_o(victim_valid[g+1]),
      .victim_way_o(victim_way[g+1]));
  end

  function automatic bit all_ready();
    for (int i = 0; i < NI; i++) if (!ready[i]) return 0;
    return 1;
  endfunction

  // One operation on all instances; returns the default build's victim.
  task automatic op(input bit miss, input logic [2:0] hw, output logic [2:0] v0);
    int got [NI];
    while (!all_ready()) @(negedge clk);
    hit_valid = !miss; miss_valid = miss; hit_way = hw;
    for (int i = 0; i < NI; i++) got[i] = -1;
    for (int c = 1; c <= 6; c++) begin
      @(negedge clk);
      hit_valid = 0; miss_valid = 0;
      for (int i = 0; i < NI; i++) if (victim_valid[i]) begin
        check(miss, $sformatf("instance %0d: victim without a miss", i));
        check(got[i] < 0, $sformatf("instance %0d: second victim pulse", i));
        got[i] = c;
        check(mask[victim_way[i]], $sformatf("instance %0d: victim %0d outside mask %b", i, victim_way[i], mask));
        if (i == 0) v0 = victim_way[0];
        if (i == 0) check(victim_way[0] == victim_way[2], "default build matches the true-LRU build");
      end
    end
    if (miss)
      for (int i = 0; i < NI; i++)
        check(got[i] >= min_lat[i] && got[i] <= max_lat[i],
              $sformatf("instance %0d: victim latency %0d", i, got[i]));
  endtask

  initial begin
    logic [2:0] v;
    hit_valid = 0; miss_valid = 0; index = 0; clos = 0; mask = '1; hit_way = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      index = IW'($urandom); clos = 1'($urandom);
      mask = (n < 150) ? 8'hFF : masks[$urandom_range(0, 5)];
      if (n < 150 && n % 2 == 0) begin
        // true-LRU order on the default build: touch every masked way, victim = first touched
        int first, order [$];
        first = -1; order.delete();
        for (int w = 0; w < WAYS; w++) if (mask[w]) order.push_back(w);
        order.shuffle();
        foreach (order[k]) begin
          if (first < 0) first = order[k];
          op(0, 3'(order[k]), v);
        end
        op(1, 3'd0, v);
        check(v == 3'(first), $sformatf("default build is true LRU: victim %0d exp %0d", v, first));
      end else begin
        logic [2:0] hw;
        do hw = 3'($urandom); while (!mask[hw]);
        op($urandom_range(0, 1), hw, v);
      end
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
