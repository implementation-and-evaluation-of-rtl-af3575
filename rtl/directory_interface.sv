// directory_interface: the single entry to the cache directory.
//
// Lookup: a pulse on lookup_i reads the set named by index_i; one clock later
// lookup_done_o pulses and set_tags_o / set_valid_o / set_dirty_o carry the
// set's tags and status bits to the tag comparator (they stay valid until the
// next lookup).
// Replacement: when the replacement algorithm names a victim (victim_valid_i
// with victim_way_i), the block takes the old tag, valid and dirty bit of that
// way from the set it still holds, writes the request's tag into the way and
// marks it valid and clean. One clock later evict_valid_o pulses with the way,
// the old tag and whether the old line must be written back (valid and dirty),
// which starts the memory interfaces.
// The sequence (read old tag and status, write new tag, pass status on to the
// memory interfaces) follows the document; the pulse handshakes are this
// design's.
module directory_interface #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  parameter int TAG_WIDTH   = cache_pkg::ADDR_WIDTH - INDEX_WIDTH - cache_pkg::OFFSET_WIDTH,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // request fields, held stable by the processor interface
  input  logic [INDEX_WIDTH-1:0]          index_i,
  input  logic [TAG_WIDTH-1:0]            tag_i,
  // lookup
  input  logic                            lookup_i,
  output logic                            lookup_done_o,
  output logic [WAYS-1:0][TAG_WIDTH-1:0]  set_tags_o,
  output logic [WAYS-1:0]                 set_valid_o,
  output logic [WAYS-1:0]                 set_dirty_o,
  // victim from the replacement algorithm
  input  logic                            victim_valid_i,
  input  logic [WAY_BITS-1:0]             victim_way_i,
  output logic                            evict_valid_o,
  output logic [WAY_BITS-1:0]             evict_way_o,
  output logic [TAG_WIDTH-1:0]            evict_tag_o,
  output logic                            evict_dirty_o,
  // directory_top ports
  output logic                            dir_rd_en_o,
  output logic [INDEX_WIDTH-1:0]          dir_rd_index_o,
  input  logic [WAYS-1:0][TAG_WIDTH-1:0]  dir_tags_i,
  input  logic [WAYS-1:0]                 dir_valid_i,
  input  logic [WAYS-1:0]                 dir_dirty_i,
  output logic                            dir_inst_en_o,
  output logic [INDEX_WIDTH-1:0]          dir_inst_index_o,
  output logic [WAY_BITS-1:0]             dir_inst_way_o,
  output logic [TAG_WIDTH-1:0]            dir_inst_tag_o
);
  assign dir_rd_en_o    = lookup_i;
  assign dir_rd_index_o = index_i;
  assign set_tags_o     = dir_tags_i;
  assign set_valid_o    = dir_valid_i;
  assign set_dirty_o    = dir_dirty_i;

  assign dir_inst_en_o    = victim_valid_i;
  assign dir_inst_index_o = index_i;
  assign dir_inst_way_o   = victim_way_i;
  assign dir_inst_tag_o   = tag_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lookup_done_o <= 1'b0;
      evict_valid_o <= 1'b0;
      evict_way_o   <= '0;
      evict_tag_o   <= '0;
      evict_dirty_o <= 1'b0;
    end else begin
      lookup_done_o <= lookup_i;
      evict_valid_o <= victim_valid_i;
      if (victim_valid_i) begin
        evict_way_o   <= victim_way_i;
        evict_tag_o   <= dir_tags_i[victim_way_i];
        evict_dirty_o <= dir_valid_i[victim_way_i] && dir_dirty_i[victim_way_i];
      end
    end
  end
endmodule
