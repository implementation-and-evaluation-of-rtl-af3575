// write_memory_interface: writes dirty victims back to main memory.
//
// Started by evict_valid_i from the directory interface, which carries the
// victim way, its old tag and whether it is valid and dirty. A clean (or
// invalid) victim needs no write-back: done_o pulses on the next clock. A
// dirty victim is read from the data RAM through the data interface
// (line_rd_o), then offered to memory on the write-back channel (wb_valid_o
// held with wb_addr_o and wb_data_o until wb_ready_i), after which done_o
// pulses. done_o, with done_way_o, starts the read memory interface.
// The write-back address is {old tag, set index, zero offset}. Checking the
// dirty bit and writing back only dirty data follows the document; the
// valid/ready channel is this design's.
module write_memory_interface #(
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
  // eviction from the directory interface
  input  logic                   evict_valid_i,
  input  logic [WAY_BITS-1:0]    evict_way_i,
  input  logic [TAG_WIDTH-1:0]   evict_tag_i,
  input  logic                   evict_dirty_i,
  // line read through the data interface
  output logic                   line_rd_o,
  output logic [WAY_BITS-1:0]    line_way_o,
  input  logic                   line_valid_i,
  input  logic [LINE_BITS-1:0]   line_i,
  // write-back channel to memory
  output logic                   wb_valid_o,
  input  logic                   wb_ready_i,
  output logic [ADDR_WIDTH-1:0]  wb_addr_o,
  output logic [LINE_BITS-1:0]   wb_data_o,
  // hand-over to the read memory interface
  output logic                   done_o,
  output logic [WAY_BITS-1:0]    done_way_o,
  output logic                   wrote_back_o
);
  typedef enum logic [2:0] {IDLE, RD_LINE, WAIT_LINE, SEND, DONE} state_e;

  state_e              state_q;
  logic [WAY_BITS-1:0] way_q;
  logic [TAG_WIDTH-1:0] tag_q;
  logic [LINE_BITS-1:0] line_q;
  logic                dirty_q;

  assign line_rd_o    = (state_q == RD_LINE);
  assign line_way_o   = way_q;
  assign wb_valid_o   = (state_q == SEND);
  assign wb_addr_o    = {tag_q, index_i, {OFFSET_WIDTH{1'b0}}};
  assign wb_data_o    = line_q;
  assign done_o       = (state_q == DONE);
  assign done_way_o   = way_q;
  assign wrote_back_o = dirty_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      way_q   <= '0;
      tag_q   <= '0;
      line_q  <= '0;
      dirty_q <= 1'b0;
    end else begin
      unique case (state_q)
        IDLE: if (evict_valid_i) begin
          way_q   <= evict_way_i;
          tag_q   <= evict_tag_i;
          dirty_q <= evict_dirty_i;
          state_q <= evict_dirty_i ? RD_LINE : DONE;
        end
        RD_LINE:   state_q <= WAIT_LINE;
        WAIT_LINE: if (line_valid_i) begin
          line_q  <= line_i;
          state_q <= SEND;
        end
        SEND:      if (wb_ready_i) state_q <= DONE;
        DONE:      state_q <= IDLE;
        default:   state_q <= IDLE;
      endcase
    end
  end

  a_wb_stable: assert property (@(posedge clk) disable iff (!rst_n)
    wb_valid_o && !wb_ready_i |=> wb_valid_o && $stable(wb_addr_o) && $stable(wb_data_o));
endmodule
