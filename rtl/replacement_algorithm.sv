// replacement_algorithm: the cache's replacement block.
//
// Instantiates the one algorithm selected by REPL when the cache is built
// (random, true LRU, NRU, binary tree, binary tree private or DRRIP) and
// passes its common interface through. Every algorithm enforces the
// partition the same way: it only picks victims among, and only updates the
// state of, the ways whose bit is set in mask_i.
//
// Interface (all algorithms):
//   hit_valid_i  one-cycle pulse while ready_o: record a hit on hit_way_i.
//   miss_valid_i one-cycle pulse while ready_o: choose a victim in mask_i.
//   victim_valid_o one-cycle pulse with victim_way_o once the victim is known.
//   ready_o      high when a new hit or miss may be given.
// The latencies are those of the selected algorithm (see its file): one cycle
// for random, two for the RAM-based ones, two to five for DRRIP.
module replacement_algorithm
  import cache_pkg::*;
#(
  parameter int    WAYS        = 8,
  parameter int    INDEX_WIDTH = 8,
  parameter int    NUM_CLOS    = 2,
  parameter repl_e REPL        = REPL_TRUE_LRU,
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
  generate
    case (REPL)
      REPL_RANDOM: begin : g_random
        repl_random #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_alg (.*);
      end
      REPL_NRU: begin : g_nru
        repl_nru #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_alg (.*);
      end
      REPL_BINARY_TREE: begin : g_bt
        repl_binary_tree #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_alg (.*);
      end
      REPL_BINARY_TREE_PRIVATE: begin : g_btp
        repl_binary_tree_private #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_alg (.*);
      end
      REPL_DRRIP: begin : g_drrip
        repl_drrip #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_alg (.*);
      end
      default: begin : g_lru
        repl_true_lru #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_alg (.*);
      end
    endcase
  endgenerate
endmodule
