// tag_directory: the tag store of the cache.
//
// A two-dimensional array with one row per set and one column per way; each
// entry is a TAG_WIDTH-bit tag. A read presents a set index and, one clock
// later, tags_o holds all WAYS tags of that set (WAYS x TAG_WIDTH bits) and
// keeps them until the next read. A write replaces the tag of one way of one
// set. Tags are not cleared on reset: the valid bits, kept separately in
// status_bits_directory, say which tags mean anything. The organisation and
// the reset rule follow the document; the one-cycle registered read is this
// design's choice.
module tag_directory #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  parameter int TAG_WIDTH   = cache_pkg::ADDR_WIDTH - INDEX_WIDTH - cache_pkg::OFFSET_WIDTH,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            rd_en_i,
  input  logic [INDEX_WIDTH-1:0]          rd_index_i,
  output logic [WAYS-1:0][TAG_WIDTH-1:0]  tags_o,
  input  logic                            wr_en_i,
  input  logic [INDEX_WIDTH-1:0]          wr_index_i,
  input  logic [WAY_BITS-1:0]             wr_way_i,
  input  logic [TAG_WIDTH-1:0]            wr_tag_i
);
  localparam int SETS = 1 << INDEX_WIDTH;

  logic [WAYS-1:0][TAG_WIDTH-1:0] tags [SETS];

  always_ff @(posedge clk) begin
    if (wr_en_i) tags[wr_index_i][wr_way_i] <= wr_tag_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       tags_o <= '0;
    else if (rd_en_i) tags_o <= tags[rd_index_i];
  end
endmodule
