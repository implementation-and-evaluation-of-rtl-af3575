// repl_random: pseudo-random replacement with way-based partitioning.
//
// A log2(WAYS)-bit counter advances every clock cycle. When a victim is
// requested the counter is sampled and turned into a way of the partition:
// the first way at or after the sampled value, wrapping around, whose bit is
// set in the partition mask. The counter is the only state, shared by all
// sets. The free-running counter is the document's; the wrap-around search
// that maps the sample into the mask is this design's choice.
//
// Timing: miss_valid_i at cycle t -> victim_valid_o at t+1. Hits need no
// update, so hit_valid_i is ignored and ready_o stays high after reset.
module repl_random #(
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
  logic [WAY_BITS-1:0] counter_q, pick;

  always_comb begin
    logic found;
    logic [WAY_BITS-1:0] cand;
    found = 1'b0;
    pick  = counter_q;
    for (int i = 0; i < WAYS; i++) begin
      cand = counter_q + WAY_BITS'(i);
      if (!found && mask_i[cand]) begin
        pick  = cand;
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      counter_q      <= '0;
      victim_valid_o <= 1'b0;
      victim_way_o   <= '0;
    end else begin
      counter_q      <= counter_q + 1'b1;
      victim_valid_o <= miss_valid_i;
      if (miss_valid_i) victim_way_o <= pick;
    end
  end

  assign ready_o = 1'b1;

  a_mask_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    miss_valid_i |-> mask_i != '0);

  logic unused;
  assign unused = ^{hit_valid_i, index_i, clos_i, hit_way_i};
endmodule
