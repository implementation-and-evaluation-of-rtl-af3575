// repl_nru: not-recently-used replacement with way-based partitioning.
//
// One "used" bit per way per set. A hit sets the bit of the hit way. On a
// miss, the lowest-numbered way of the partition whose bit is 0 is the victim;
// if every way of the partition has its bit set, the partition's bits are
// cleared and the lowest-numbered way of the partition is the victim. The
// victim's bit is then set, since the new line counts as recently used. Ways
// outside the partition mask are never changed. This is the document's
// algorithm. After reset an init sweep clears one set per cycle (ready_o low
// for SETS cycles); the sweep and the all-zero start are this design's choice.
//
// Timing: the set's bits are one RAM word, fetched in the cycle after the
// request and updated in the next one:
//   hit_valid_i  at t -> fetch t+1, write t+2, ready again at t+3
//   miss_valid_i at t -> victim_valid_o at t+2
module repl_nru #(
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
  typedef enum logic [1:0] {INIT, IDLE, FETCH, ACT} state_e;

  logic [WAYS-1:0]        mem [SETS];
  logic [WAYS-1:0]        row_q, row_upd;
  state_e                 state_q;
  logic                   is_miss_q;
  logic [INDEX_WIDTH-1:0] index_q;
  logic [WAYS-1:0]        mask_q;
  logic [WAY_BITS-1:0]    way_q, victim;

  always_comb begin
    logic full, found;
    full   = ((row_q & mask_q) == mask_q);
    found  = 1'b0;
    victim = '0;
    row_upd = row_q;
    if (is_miss_q) begin
      if (full) row_upd = row_q & ~mask_q;
      for (int w = 0; w < WAYS; w++)
        if (!found && mask_q[w] && (full || !row_q[w])) begin
          victim = WAY_BITS'(w);
          found  = 1'b1;
        end
      row_upd[victim] = 1'b1;
    end else begin
      row_upd[way_q] = 1'b1;
    end
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
      mem_wdata = '0;
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
  a_victim_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    victim_valid_o |-> mask_q[victim_way_o]);

  logic unused;
  assign unused = ^clos_i;
endmodule
