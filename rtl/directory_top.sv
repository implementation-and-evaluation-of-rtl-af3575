// directory_top: the cache directory, the tag directory and the status bits
// directory side by side.
//
// It only instantiates the two stores and gives the rest of the cache one
// access point: one read port that returns, one clock after rd_en_i, the
// tags, valid bits and dirty bits of a set; an install port that writes a new
// tag into one way and marks it valid and clean; and a port that marks a line
// dirty. Its role follows the document; the port grouping is this design's.
module directory_top #(
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
  output logic [WAYS-1:0]                 valid_o,
  output logic [WAYS-1:0]                 dirty_o,
  input  logic                            inst_en_i,
  input  logic [INDEX_WIDTH-1:0]          inst_index_i,
  input  logic [WAY_BITS-1:0]             inst_way_i,
  input  logic [TAG_WIDTH-1:0]            inst_tag_i,
  input  logic                            dirty_en_i,
  input  logic [INDEX_WIDTH-1:0]          dirty_index_i,
  input  logic [WAY_BITS-1:0]             dirty_way_i
);
  tag_directory #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .TAG_WIDTH(TAG_WIDTH)) u_tags (
    .clk, .rst_n, .rd_en_i, .rd_index_i, .tags_o,
    .wr_en_i(inst_en_i), .wr_index_i(inst_index_i), .wr_way_i(inst_way_i), .wr_tag_i(inst_tag_i)
  );

  status_bits_directory #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH)) u_status (
    .clk, .rst_n, .rd_en_i, .rd_index_i, .valid_o, .dirty_o,
    .inst_en_i, .inst_index_i, .inst_way_i,
    .dirty_en_i, .dirty_index_i, .dirty_way_i
  );
endmodule
