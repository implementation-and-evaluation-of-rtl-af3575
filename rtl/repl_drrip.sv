// repl_drrip: dynamic re-reference interval prediction (DRRIP) replacement
// with way-based partitioning.
//
// Every way holds an M-bit re-reference prediction value (RRPV, M = 2); the
// RRPVs of a set form one RAM word. A hit sets the hit way's RRPV to 0. On a
// miss, the lowest-numbered way of the partition with RRPV 2^M-1 is the
// victim; if there is none, every way of the partition is aged by one and
// the search repeats, one search per cycle. The victim is then inserted with
// RRPV 2^M-2 under SRRIP, or under BRRIP with 2^M-1 except when the LFSR bit
// is 1 (about one time in 15), then 2^M-2. Ways outside the mask are never
// read for a victim or aged.
//
// Set dueling: in each group of SETS/SDM_SETS consecutive sets (at least 4)
// the first is an SRRIP leader and the second a BRRIP leader, which gives
// SDM_SETS leaders of each kind at 256 sets and more. Hits in leader sets move
// the PSEL counter (drrip_psel); follower sets use the policy its MSB selects.
// The leader placement and the one-search-per-cycle ageing loop are this
// design's choices; RRPV width, insertion values, PSEL and LFSR follow the
// document.
//
// Timing, from miss_valid_i at cycle t: the RRPV word is fetched at t+1 and
// the first search is at t+2. With an RRPV of 2^M-1 already in the partition
// victim_valid_o is at t+2; in the worst case (all RRPVs 0) it is at t+5,
// that is 2*M cycles after the fetch, the worst case given in the document's
// latency table (its RRIP section gives nine cycles instead; the table was
// followed). A hit is fetched at t+1 and written at t+2. ready_o is high only
// in the idle state. After reset an init sweep sets every RRPV to 0, one set
// per cycle, with ready_o low for SETS cycles (this design's choice).
module repl_drrip #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  parameter int NUM_CLOS    = 2,
  parameter int M           = 2,
  parameter int SDM_SETS    = 32,
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
  localparam int SETS  = 1 << INDEX_WIDTH;
  localparam int GROUP = (SETS / SDM_SETS >= 4) ? SETS / SDM_SETS : 4;
  localparam int GROUP_BITS = $clog2(GROUP);
  localparam logic [M-1:0] RRPV_DISTANT = '1;
  localparam logic [M-1:0] RRPV_LONG    = RRPV_DISTANT - 1'b1;

  typedef logic [WAYS-1:0][M-1:0] row_t;
  typedef enum logic [2:0] {INIT, IDLE, FETCH, HIT_UPD, SEARCH} state_e;

  row_t                   mem [SETS];
  row_t                   row_q, row_aged, row_ins, row_hit;
  state_e                 state_q;
  logic [INDEX_WIDTH-1:0] index_q;
  logic [WAYS-1:0]        mask_q;
  logic [WAY_BITS-1:0]    way_q, victim;
  logic                   is_miss_q, found;
  logic                   srrip_leader, brrip_leader, use_srrip, psel_srrip, lfsr_bit;
  logic [1:0]             psel_count;
  logic [3:0]             lfsr_state;

  assign srrip_leader = (index_q[GROUP_BITS-1:0] == GROUP_BITS'(0));
  assign brrip_leader = (index_q[GROUP_BITS-1:0] == GROUP_BITS'(1));
  assign use_srrip    = srrip_leader || (!brrip_leader && psel_srrip);

  drrip_lfsr u_lfsr (.clk(clk), .rst_n(rst_n), .bit_o(lfsr_bit), .state_o(lfsr_state));

  drrip_psel u_psel (
    .clk(clk), .rst_n(rst_n),
    .inc_i(state_q == HIT_UPD && srrip_leader),
    .dec_i(state_q == HIT_UPD && brrip_leader),
    .use_srrip_o(psel_srrip), .count_o(psel_count)
  );

  // Search the partition for a distant RRPV; age it when there is none.
  always_comb begin
    found    = 1'b0;
    victim   = '0;
    row_aged = row_q;
    for (int w = 0; w < WAYS; w++)
      if (!found && mask_q[w] && row_q[w] == RRPV_DISTANT) begin
        victim = WAY_BITS'(w);
        found  = 1'b1;
      end
    for (int w = 0; w < WAYS; w++)
      if (mask_q[w]) row_aged[w] = row_q[w] + 1'b1;
    row_hit = row_q;
    row_hit[way_q] = '0;
    row_ins = row_q;
    row_ins[victim] = (use_srrip || lfsr_bit) ? RRPV_LONG : RRPV_DISTANT;
  end

  assign ready_o        = (state_q == IDLE);
  assign victim_valid_o = (state_q == SEARCH) && found;
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
    mem_wdata = is_miss_q ? row_ins : row_hit;
    if (state_q == INIT) begin
      mem_we    = 1'b1;
      mem_waddr = init_idx_q;
      mem_wdata = '0;
    end else if ((state_q == HIT_UPD) || (state_q == SEARCH && found)) begin
      mem_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (state_q == FETCH) row_q <= mem[index_q];
    else if (state_q == SEARCH && !found) row_q <= row_aged;
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
        FETCH:   state_q <= is_miss_q ? SEARCH : HIT_UPD;
        HIT_UPD: state_q <= IDLE;
        SEARCH:  if (found) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  a_mask_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    ready_o && (hit_valid_i || miss_valid_i) |-> mask_i != '0);
  a_victim_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    victim_valid_o |-> mask_q[victim_way_o]);

  logic unused;
  assign unused = ^{clos_i, psel_count, lfsr_state};
endmodule
