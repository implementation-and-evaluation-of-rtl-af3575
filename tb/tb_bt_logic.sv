// tb_bt_logic: self-checking test of bt_logic (combinational).
//
// Checks the tree example of Figure 2.4 (root 1, children 0: the least
// recently used line is way 2 of a 4-way tree), then compares random trees,
// masks and hit ways with a reference written as a walk over way ranges:
// forced directions, the victim, the tree after a victim search and the tree
// after a hit. Also checks that up and down are never both set.
module tb_bt_logic;
  int checks = 0, failures = 0;
  logic [2:0] t4; logic [3:0] m4; logic [1:0] hw4, v4; logic [2:0] u4, d4, tv4, th4;
  logic [6:0] t8; logic [7:0] m8; logic [2:0] hw8, v8; logic [6:0] u8, d8, tv8, th8;

  bt_logic #(.WAYS(4)) dut4 (.tree_i(t4), .mask_i(m4), .hit_way_i(hw4), .up_o(u4), .down_o(d4),
                             .victim_o(v4), .tree_victim_o(tv4), .tree_hit_o(th4));
  bt_logic #(.WAYS(8)) dut8 (.tree_i(t8), .mask_i(m8), .hit_way_i(hw8), .up_o(u8), .down_o(d8),
                             .victim_o(v8), .tree_victim_o(tv8), .tree_hit_o(th8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Reference: walk over [lo, hi); returns way and the updated tree.
  function automatic int ref_walk(input logic [6:0] tree, input logic [7:0] m, input bit victim_mode,
                                  input int hw, output logic [6:0] tree_out);
    int n = 0, lo = 0, hi = 8;
    tree_out = tree;
    while (hi - lo > 1) begin
      int mid = (lo + hi) / 2;
      bit any_up = 0, any_lo = 0, go_lower;
      for (int w = lo; w < mid; w++) any_up |= m[w];
      for (int w = mid; w < hi; w++) any_lo |= m[w];
      if (any_up && !any_lo) go_lower = 0;
      else if (any_lo && !any_up) go_lower = 1;
      else begin
        go_lower = victim_mode ? tree[n] : (hw >= mid);
        tree_out[n] = !go_lower;
      end
      if (go_lower) begin lo = mid; n = 2 * n + 2; end else begin hi = mid; n = 2 * n + 1; end
    end
    return lo;
  endfunction

  initial begin
    // Figure 2.4: nodes {root, upper child, lower child} = {1, 0, 0}.
    t4 = 3'b001; m4 = 4'hF; hw4 = 0;
    #1 check(v4 == 2'd2, "Figure 2.4: victim is way 2 (C)");
    check(tv4 == 3'b100, "Figure 2.4: root and lower child inverted");
    for (int n = 0; n < 5000; n++) begin
      logic [6:0] et;
      int ev;
      t8 = 7'($urandom); hw8 = 3'($urandom);
      do m8 = 8'($urandom); while (m8 == 0 || !m8[hw8]);
      #1;
      check((u8 & d8) == 0, "up and down both set");
      ev = ref_walk(t8, m8, 1, 0, et);
      check(v8 == 3'(ev), $sformatf("tree %b mask %b: victim %0d exp %0d", t8, m8, v8, ev));
      check(m8[v8], "victim inside mask");
      check(tv8 == et, "tree after victim search");
      void'(ref_walk(t8, m8, 0, int'(hw8), et));
      check(th8 == et, "tree after hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
