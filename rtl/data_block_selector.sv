// data_block_selector: the data RAM of the cache.
//
// Holds one LINE_BITS-bit line for every way of every set, addressed by
// {set index, way}. A read presents the set and way; one clock later rdata_o
// holds that line and keeps it until the next read. A write stores a whole
// line. Contents are not reset; only lines marked valid are ever read. The
// document gives the block's role (all the data of the cache, as a RAM); the
// one-cycle registered read and whole-line writes are this design's choices.
module data_block_selector #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  parameter int LINE_BITS   = cache_pkg::LINE_BITS,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rd_en_i,
  input  logic [INDEX_WIDTH-1:0] rd_index_i,
  input  logic [WAY_BITS-1:0]    rd_way_i,
  output logic [LINE_BITS-1:0]   rdata_o,
  input  logic                   wr_en_i,
  input  logic [INDEX_WIDTH-1:0] wr_index_i,
  input  logic [WAY_BITS-1:0]    wr_way_i,
  input  logic [LINE_BITS-1:0]   wdata_i
);
  localparam int LINES = (1 << INDEX_WIDTH) * WAYS;

  logic [LINE_BITS-1:0] lines [LINES];

  always_ff @(posedge clk) begin
    if (wr_en_i) lines[{wr_index_i, wr_way_i}] <= wdata_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rdata_o <= '0;
    else if (rd_en_i) rdata_o <= lines[{rd_index_i, rd_way_i}];
  end
endmodule
