// read_memory_interface: fetches the requested line from main memory.
//
// Started by start_i (from the write memory interface, once any write-back is
// done) with the victim way. It offers the line address {tag, set index, zero
// offset} on the read channel (rd_valid_o held until rd_ready_i), waits for
// rd_rsp_valid_i, and then pulses fill_o with the line and the victim way so
// the data interface inserts it. The role follows the document; the request
// and response channel is this design's.
module read_memory_interface #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  localparam int ADDR_WIDTH = cache_pkg::ADDR_WIDTH,
  localparam int OFFSET_WIDTH = cache_pkg::OFFSET_WIDTH,
  localparam int TAG_WIDTH  = ADDR_WIDTH - INDEX_WIDTH - OFFSET_WIDTH,
  localparam int LINE_BITS  = cache_pkg::LINE_BITS,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [INDEX_WIDTH-1:0] index_i,
  input  logic [TAG_WIDTH-1:0]   tag_i,
  input  logic                   start_i,
  input  logic [WAY_BITS-1:0]    way_i,
  // read channel to memory
  output logic                   rd_valid_o,
  input  logic                   rd_ready_i,
  output logic [ADDR_WIDTH-1:0]  rd_addr_o,
  input  logic                   rd_rsp_valid_i,
  input  logic [LINE_BITS-1:0]   rd_rsp_data_i,
  // line to the data interface
  output logic                   fill_o,
  output logic [WAY_BITS-1:0]    fill_way_o,
  output logic [LINE_BITS-1:0]   fill_line_o
);
  typedef enum logic [1:0] {IDLE, REQ, WAIT_RSP, FILL} state_e;

  state_e               state_q;
  logic [WAY_BITS-1:0]  way_q;
  logic [LINE_BITS-1:0] line_q;

  assign rd_valid_o  = (state_q == REQ);
  assign rd_addr_o   = {tag_i, index_i, {OFFSET_WIDTH{1'b0}}};
  assign fill_o      = (state_q == FILL);
  assign fill_way_o  = way_q;
  assign fill_line_o = line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      way_q   <= '0;
      line_q  <= '0;
    end else begin
      unique case (state_q)
        IDLE:     if (start_i) begin
          way_q   <= way_i;
          state_q <= REQ;
        end
        REQ:      if (rd_ready_i) state_q <= WAIT_RSP;
        WAIT_RSP: if (rd_rsp_valid_i) begin
          line_q  <= rd_rsp_data_i;
          state_q <= FILL;
        end
        FILL:     state_q <= IDLE;
        default:  state_q <= IDLE;
      endcase
    end
  end
endmodule
