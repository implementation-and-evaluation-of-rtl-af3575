// repl_true_lru: true LRU replacement with way-based partitioning.
//
// Every way of every set has a log2(WAYS)-bit recency counter: 0 is the most
// recently used line, WAYS-1 the least recently used. On a hit, the ways of
// the requester's partition whose counter is smaller than the hit way's are
// incremented and the hit way is set to 0. On a miss, the way of the partition
// with the largest counter is the victim, and it is then promoted the same way
// a hit would be. Ways outside the partition mask are neither read nor changed,
// which is how the partition is enforced. All of this follows the document.
//
// The counters of a set sit in one RAM word, read in one cycle (FETCH) and
// updated in the next (ACT):
//   hit_valid_i  at cycle t -> row fetched at t+1, written at t+2, ready at t+3
//   miss_valid_i at cycle t -> victim_valid_o at t+2 (one cycle after the fetch)
// After reset an init sweep writes one set per cycle, giving way w of every
// set counter w (a legal recency stack); ready_o stays low for those SETS
// cycles. Design choices: that start state, the sweep, and ties for the
// largest counter going to the lowest way.
module repl_true_lru #(
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
  localparam int SETS = 1 << INDEX_WIDTH;
  typedef logic [WAYS-1:0][WAY_BITS-1:0] row_t;
  typedef enum logic [1:0] {INIT, IDLE, FETCH, ACT} state_e;

  row_t                   mem [SETS];

  // Reset content of every set: way w holds counter w.
  function automatic row_t init_row();
    row_t r;
    for (int w = 0; w < WAYS; w++) r[w] = WAY_BITS'(w);
    return r;
  endfunction
  localparam row_t INIT_ROW = init_row();
  row_t                   row_q, row_upd;
  state_e                 state_q;
  logic                   is_miss_q;
  logic [INDEX_WIDTH-1:0] index_q;
  logic [WAYS-1:0]        mask_q;
  logic [WAY_BITS-1:0]    way_q, victim, touch_way;

  // Victim: masked way with the largest counter.
  always_comb begin
    logic found;
    found  = 1'b0;
    victim = '0;
    for (int w = 0; w < WAYS; w++)
      if (mask_q[w] && (!found || row_q[w] > row_q[victim])) begin
        victim = WAY_BITS'(w);
        found  = 1'b1;
      end
  end

  // Promote touch_way to MRU inside the partition.
  always_comb begin
    touch_way = is_miss_q ? victim : way_q;
    row_upd   = row_q;
    for (int w = 0; w < WAYS; w++)
      if (mask_q[w] && row_q[w] < row_q[touch_way]) row_upd[w] = row_q[w] + 1'b1;
    row_upd[touch_way] = '0;
  end

  assign ready_o        = (state_q == IDLE);
  assign victim_valid_o = (state_q == ACT) && is_miss_q;
  assign victim_way_o   = victim;

  // State RAM: one write port (init sweep or update), one read port.
  logic                 init_done;
  logic [INDEX_WIDTH-1:0] init_idx_q;
  logic                 mem_we;
  logic [INDEX_WIDTH-1:0] mem_waddr;
  logic [$bits(row_q)-1:0] mem_wdata;

  assign init_done = (init_idx_q == '1);

  always_comb begin
    mem_we    = 1'b0;
    mem_waddr = index_q;
    mem_wdata = row_upd;
    if (state_q == INIT) begin
      mem_we    = 1'b1;
      mem_waddr = init_idx_q;
      mem_wdata = INIT_ROW;
    end else if (state_q == ACT) begin
      mem_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (state_q == FETCH) row_q <= mem[index_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= INIT;
      init_idx_q <= '0;
      is_miss_q  <= 1'b0;
      index_q    <= '0;
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
          index_q   <= index_i;
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
  a_hit_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    ready_o && hit_valid_i |-> mask_i[hit_way_i]);
  a_victim_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    victim_valid_o |-> mask_q[victim_way_o]);

  logic unused;
  assign unused = ^clos_i;
endmodule
