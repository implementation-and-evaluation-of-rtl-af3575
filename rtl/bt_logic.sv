// bt_logic: one step of binary-tree pseudo-LRU with partition forcing.
//
// The tree of a set is held as WAYS-1 node bits in an array: node 0 is the
// root, node i has its upper child at 2i+1 and its lower child at 2i+2. The
// upper half of a node covers the lower-numbered ways. A node value of 1 says
// the most recently used line is in the upper half, 0 says the lower half, so
// the search for a victim goes the opposite way: up on 0, down on 1.
//
// Partitioning uses an up-vector and a down-vector, one bit per node. A set
// up bit forces the search up at that node, a set down bit forces it down,
// and only a node with neither bit set follows (and updates) its stored value.
// The vectors are derived here from the partition mask: a node is forced up
// when its lower half holds no way of the partition and down when its upper
// half holds none, so both bits are never set together. Deriving them from
// the mask, rather than storing them per class of service, is this design's
// choice; the traversal, the child numbering and the forcing rule follow the
// document.
//
// Purely combinational. victim_o is the way found by the search and
// tree_victim_o the tree after that search (every free node on the path
// inverted, which makes the new line the most recently used). tree_hit_o is
// the tree after a hit on hit_way_i: every free node on that path is pointed
// at the hit way.
module bt_logic #(
  parameter int WAYS      = 8,
  localparam int WAY_BITS = $clog2(WAYS),
  localparam int NODES    = WAYS - 1
) (
  input  logic [NODES-1:0]    tree_i,
  input  logic [WAYS-1:0]     mask_i,
  input  logic [WAY_BITS-1:0] hit_way_i,
  output logic [NODES-1:0]    up_o,
  output logic [NODES-1:0]    down_o,
  output logic [WAY_BITS-1:0] victim_o,
  output logic [NODES-1:0]    tree_victim_o,
  output logic [NODES-1:0]    tree_hit_o
);
  // Up and down vectors from the mask.
  always_comb begin
    for (int l = 0; l < WAY_BITS; l++) begin
      for (int p = 0; p < (1 << l); p++) begin
        int  n, span;
        logic any_upper, any_lower;
        n    = (1 << l) - 1 + p;
        span = WAYS >> l;
        any_upper = 1'b0;
        any_lower = 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          if (w >= p * span && w < p * span + span / 2)        any_upper |= mask_i[w];
          if (w >= p * span + span / 2 && w < (p + 1) * span)  any_lower |= mask_i[w];
        end
        up_o[n]   = any_upper && !any_lower;
        down_o[n] = any_lower && !any_upper;
      end
    end
  end

  // Victim search: root to leaf.
  always_comb begin
    int   n;
    logic dir;
    n = 0;
    victim_o      = '0;
    tree_victim_o = tree_i;
    for (int l = 0; l < WAY_BITS; l++) begin
      if (up_o[n])        dir = 1'b0;
      else if (down_o[n]) dir = 1'b1;
      else begin
        dir = tree_i[n];
        tree_victim_o[n] = ~tree_i[n];
      end
      victim_o = {victim_o[WAY_BITS-2:0], dir};
      n = 2 * n + 1 + int'(dir);
    end
  end

  // Hit update: point every free node on the path at the hit way.
  always_comb begin
    int   n;
    logic dir;
    n = 0;
    tree_hit_o = tree_i;
    for (int l = 0; l < WAY_BITS; l++) begin
      dir = hit_way_i[WAY_BITS-1-l];
      if (!up_o[n] && !down_o[n]) tree_hit_o[n] = ~dir;
      n = 2 * n + 1 + int'(dir);
    end
  end
endmodule
