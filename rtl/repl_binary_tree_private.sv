// repl_binary_tree_private: binary-tree pseudo-LRU replacement with one tree
// per class of service per set.
//
// Same tree logic as repl_binary_tree (see bt_logic), but the tree word is
// addressed by {set index, CLOS ID}, so a class of service never changes the
// recency information of another. With disjoint partitions it behaves exactly
// like the shared tree. This variant and its storage of one tree per CLOS per
// set follow the document; trees start at all zeros, written after reset by
// an init sweep of one tree per cycle (ready_o low until it ends).
//
// Timing: the tree word is fetched in the cycle after the request and
// written back in the next:
//   hit_valid_i  at t -> fetch t+1, write t+2, ready again at t+3
//   miss_valid_i at t -> victim_valid_o at t+2
module repl_binary_tree_private #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  parameter int NUM_CLOS    = 2,
  localparam int WAY_BITS   = $clog2(WAYS),
  localparam int CLOS_BITS  = (NUM_CLOS > 1) ? $clog2(NUM_CLOS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   hit_valid_i,
  input  logic                   miss_valid_i,
  input  logic [INDEX_WIDTH-1:0] index_i,
  input  logic [CLOS_BITS-1:0]   clos_i,
  input  logic [WAYS-1:0]        mask_i,
  input  logic [WAY_BITS-1:0]    hit_way_i,
  output logic                   ready_o,
  output logic                   victim_valid_o,
  output logic [WAY_BITS-1:0]    victim_way_o
);
  localparam int NODES   = WAYS - 1;
  localparam int ENTRIES = (1 << INDEX_WIDTH) * (1 << CLOS_BITS);
  localparam int ADDR_BITS = INDEX_WIDTH + CLOS_BITS;
  typedef enum logic [1:0] {INIT, IDLE, FETCH, ACT} state_e;

  logic [NODES-1:0]     mem [ENTRIES];
  logic [NODES-1:0]     tree_q, tree_victim, tree_hit;
  logic [NODES-1:0]     up, down;
  state_e               state_q;
  logic                 is_miss_q;
  logic [ADDR_BITS-1:0] addr_q, addr_d;
  logic [WAYS-1:0]      mask_q;
  logic [WAY_BITS-1:0]  way_q, victim;

  assign addr_d = {index_i, clos_i};

  bt_logic #(.WAYS(WAYS)) u_bt (
    .tree_i(tree_q), .mask_i(mask_q), .hit_way_i(way_q),
    .up_o(up), .down_o(down), .victim_o(victim),
    .tree_victim_o(tree_victim), .tree_hit_o(tree_hit)
  );

  assign ready_o        = (state_q == IDLE);
  assign victim_valid_o = (state_q == ACT) && is_miss_q;
  assign victim_way_o   = victim;

  // State RAM: one write port (init sweep or update), one read port.
  logic                 init_done;
  logic [ADDR_BITS-1:0] init_idx_q;
  logic                 mem_we;
  logic [ADDR_BITS-1:0] mem_waddr;
  logic [$bits(tree_q)-1:0] mem_wdata;

  assign init_done = (init_idx_q == '1);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = addr_q;
    mem_wdata = is_miss_q ? tree_victim : tree_hit;
    if (state_q == INIT) begin
      mem_we    = 1'b1;
      mem_waddr = init_idx_q;
      mem_wdata = '0;
    end else if (state_q == ACT) begin
      mem_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (state_q == FETCH) tree_q <= mem[addr_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= INIT;
      init_idx_q <= '0;
      is_miss_q  <= 1'b0;
      addr_q    <= '0;
      mask_q     <= '0;
      way_q      <= '0;
    end else begin
      unique case (state_q)
        INIT: begin
          init_idx_q <= init_idx_q + 1'b1;
          if (init_done) state_q <= IDLE;
        end
        IDLE: if (hit_valid_i || miss_valid_i) begin
          state_q   <= FETCH;
          is_miss_q <= miss_valid_i;
          addr_q   <= addr_d;
          mask_q    <= mask_i;
          way_q     <= hit_way_i;
        end
        FETCH: state_q <= ACT;
        ACT:   state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  a_mask_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    ready_o && (hit_valid_i || miss_valid_i) |-> mask_i != '0);
  a_victim_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    victim_valid_o |-> mask_q[victim_way_o]);
  a_up_down_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    (up & down) == '0);

endmodule
