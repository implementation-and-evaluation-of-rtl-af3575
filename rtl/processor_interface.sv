// processor_interface: where requests enter the cache and responses leave.
//
// A request (read or write of one 64-bit word, with the requester's partition
// mask and CLOS ID) is accepted when req_valid and req_ready are both high;
// req_ready is high only when the cache is idle and the replacement algorithm
// is ready, so one request is handled at a time. The accepted request is
// registered and split into tag, set index and word offset, which stay
// stable on the *_o outputs until the request ends. One clock after
// acceptance lookup_o pulses to start the directory lookup. When the data
// interface reports done_i, resp_valid pulses one clock later with the data
// (the written word for a write) and whether the request hit.
// Being the entry and exit point follows the document; the handshake and the
// word size are this design's choices.
module processor_interface #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  parameter int NUM_CLOS    = 2,
  localparam int ADDR_WIDTH = cache_pkg::ADDR_WIDTH,
  localparam int OFFSET_WIDTH = cache_pkg::OFFSET_WIDTH,
  localparam int TAG_WIDTH  = ADDR_WIDTH - INDEX_WIDTH - OFFSET_WIDTH,
  localparam int WORD_BITS  = cache_pkg::WORD_BITS,
  localparam int WORD_SEL_BITS = cache_pkg::WORD_SEL_BITS,
  localparam int CLOS_BITS  = (NUM_CLOS > 1) ? $clog2(NUM_CLOS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // requester side
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_write,
  input  logic [ADDR_WIDTH-1:0]    req_addr,
  input  logic [WORD_BITS-1:0]     req_wdata,
  input  logic [WAYS-1:0]          req_mask,
  input  logic [CLOS_BITS-1:0]     req_clos,
  output logic                     resp_valid,
  output logic [WORD_BITS-1:0]     resp_rdata,
  output logic                     resp_hit,
  // to the rest of the cache
  input  logic                     ready_i,
  output logic                     lookup_o,
  output logic [TAG_WIDTH-1:0]     tag_o,
  output logic [INDEX_WIDTH-1:0]   index_o,
  output logic [WORD_SEL_BITS-1:0] word_o,
  output logic                     write_o,
  output logic [WORD_BITS-1:0]     wdata_o,
  output logic [WAYS-1:0]          mask_o,
  output logic [CLOS_BITS-1:0]     clos_o,
  input  logic                     done_i,
  input  logic                     done_hit_i,
  input  logic [WORD_BITS-1:0]     rdata_i
);
  typedef enum logic [1:0] {IDLE, LOOKUP, BUSY} state_e;

  state_e                state_q;
  logic [ADDR_WIDTH-1:0] addr_q;

  assign req_ready = (state_q == IDLE) && ready_i;
  assign lookup_o  = (state_q == LOOKUP);
  assign tag_o     = addr_q[ADDR_WIDTH-1 -: TAG_WIDTH];
  assign index_o   = addr_q[OFFSET_WIDTH +: INDEX_WIDTH];
  assign word_o    = addr_q[OFFSET_WIDTH-1 -: WORD_SEL_BITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= IDLE;
      addr_q     <= '0;
      write_o    <= 1'b0;
      wdata_o    <= '0;
      mask_o     <= '0;
      clos_o     <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_hit   <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        IDLE: if (req_valid && req_ready) begin
          addr_q  <= req_addr;
          write_o <= req_write;
          wdata_o <= req_wdata;
          mask_o  <= req_mask;
          clos_o  <= req_clos;
          state_q <= LOOKUP;
        end
        LOOKUP: state_q <= BUSY;
        BUSY: if (done_i) begin
          resp_valid <= 1'b1;
          resp_rdata <= rdata_i;
          resp_hit   <= done_hit_i;
          state_q    <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  a_mask_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && req_ready |-> req_mask != '0);

  logic unused;
  assign unused = ^addr_q[OFFSET_WIDTH-WORD_SEL_BITS-1:0];
endmodule
