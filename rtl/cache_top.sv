// cache_top: a set-associative cache with way-based partitioning.
//
// Requests carry the partition (capacity) bit mask and the class-of-service
// (CLOS) ID of the requester. Only ways whose mask bit is set can hit, can be
// chosen as victims and have their replacement state changed, so each CLOS
// is confined to its ways while sharing the same sets. The replacement
// algorithm is chosen when the cache is built (REPL).
//
// Flow of one request (one request at a time):
//   processor_interface registers it and starts a lookup;
//   directory_interface reads the set's tags, valid and dirty bits
//   (directory_top) and tag_comparator checks them against the tag within
//   the mask.
//   Hit: data_interface reads or writes the word in data_block_selector
//   (setting the dirty bit on a write), while the replacement algorithm
//   records the hit.
//   Miss: the replacement algorithm names a victim way inside the mask;
//   directory_interface installs the new tag there and passes the old tag and
//   dirty state to write_memory_interface, which writes a dirty line back;
//   read_memory_interface then fetches the new line, and data_interface
//   inserts it (merging the write data and setting the dirty bit for a write).
//   The response returns through processor_interface.
// Timing from acceptance (req_valid && req_ready at cycle 0): a hit responds
// (resp_valid) at cycle 3; a miss adds the replacement latency, the memory
// round trips and a few hand-over cycles. After reset the replacement block
// clears its state RAM one set per cycle; req_ready stays low until it is done.
//
// Memory side: a write-back channel (wb_*) and a line-read channel (rd_*),
// both with valid/ready; read data returns on rd_rsp_valid/rd_rsp_data.
// The block structure follows the document; handshakes, word size and the
// response format are this design's choices.
module cache_top
  import cache_pkg::*;
#(
  parameter int    WAYS        = 8,
  parameter int    INDEX_WIDTH = 8,
  parameter int    NUM_CLOS    = 2,
  parameter repl_e REPL        = REPL_TRUE_LRU,
  localparam int TAG_WIDTH   = ADDR_WIDTH - INDEX_WIDTH - OFFSET_WIDTH,
  localparam int WAY_BITS    = $clog2(WAYS),
  localparam int CLOS_BITS   = (NUM_CLOS > 1) ? $clog2(NUM_CLOS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor side
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_write,
  input  logic [ADDR_WIDTH-1:0] req_addr,
  input  logic [WORD_BITS-1:0]  req_wdata,
  input  logic [WAYS-1:0]       req_mask,
  input  logic [CLOS_BITS-1:0]  req_clos,
  output logic                  resp_valid,
  output logic [WORD_BITS-1:0]  resp_rdata,
  output logic                  resp_hit,
  // main memory: write-back
  output logic                  wb_valid,
  input  logic                  wb_ready,
  output logic [ADDR_WIDTH-1:0] wb_addr,
  output logic [LINE_BITS-1:0]  wb_data,
  // main memory: line read
  output logic                  rd_valid,
  input  logic                  rd_ready,
  output logic [ADDR_WIDTH-1:0] rd_addr,
  input  logic                  rd_rsp_valid,
  input  logic [LINE_BITS-1:0]  rd_rsp_data
);
  // request fields
  logic                     lookup;
  logic [TAG_WIDTH-1:0]     tag;
  logic [INDEX_WIDTH-1:0]   index;
  logic [WORD_SEL_BITS-1:0] word;
  logic                     write;
  logic [WORD_BITS-1:0]     wdata;
  logic [WAYS-1:0]          mask;
  logic [CLOS_BITS-1:0]     clos;

  // directory
  logic                           dir_rd_en, dir_inst_en, dirty_en;
  logic [INDEX_WIDTH-1:0]         dir_rd_index, dir_inst_index, dirty_index;
  logic [WAY_BITS-1:0]            dir_inst_way, dirty_way;
  logic [TAG_WIDTH-1:0]           dir_inst_tag;
  logic [WAYS-1:0][TAG_WIDTH-1:0] dir_tags, set_tags;
  logic [WAYS-1:0]                dir_valid, dir_dirty, set_valid, set_dirty;
  logic                           lookup_done;

  // comparator and replacement
  logic                hit, miss;
  logic [WAY_BITS-1:0] hit_way, victim_way;
  logic                repl_ready, victim_valid;

  // eviction and fill
  logic                 evict_valid, evict_dirty, evict_line_valid, line_rd;
  logic [WAY_BITS-1:0]  evict_way, line_way, wmi_done_way, fill_way;
  logic [TAG_WIDTH-1:0] evict_tag;
  logic [LINE_BITS-1:0] evict_line, fill_line;
  logic                 wmi_done, wrote_back, fill;

  // data
  logic                   ram_rd_en, ram_wr_en;
  logic [INDEX_WIDTH-1:0] ram_rd_index, ram_wr_index;
  logic [WAY_BITS-1:0]    ram_rd_way, ram_wr_way;
  logic [LINE_BITS-1:0]   ram_rdata, ram_wdata;
  logic                   done, done_hit;
  logic [WORD_BITS-1:0]   rdata;

  processor_interface #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS)) u_proc_if (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .req_mask, .req_clos,
    .resp_valid, .resp_rdata, .resp_hit,
    .ready_i(repl_ready), .lookup_o(lookup), .tag_o(tag), .index_o(index), .word_o(word),
    .write_o(write), .wdata_o(wdata), .mask_o(mask), .clos_o(clos),
    .done_i(done), .done_hit_i(done_hit), .rdata_i(rdata)
  );

  directory_interface #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .TAG_WIDTH(TAG_WIDTH)) u_dir_if (
    .clk, .rst_n, .index_i(index), .tag_i(tag),
    .lookup_i(lookup), .lookup_done_o(lookup_done),
    .set_tags_o(set_tags), .set_valid_o(set_valid), .set_dirty_o(set_dirty),
    .victim_valid_i(victim_valid), .victim_way_i(victim_way),
    .evict_valid_o(evict_valid), .evict_way_o(evict_way), .evict_tag_o(evict_tag),
    .evict_dirty_o(evict_dirty),
    .dir_rd_en_o(dir_rd_en), .dir_rd_index_o(dir_rd_index),
    .dir_tags_i(dir_tags), .dir_valid_i(dir_valid), .dir_dirty_i(dir_dirty),
    .dir_inst_en_o(dir_inst_en), .dir_inst_index_o(dir_inst_index),
    .dir_inst_way_o(dir_inst_way), .dir_inst_tag_o(dir_inst_tag)
  );

  directory_top #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .TAG_WIDTH(TAG_WIDTH)) u_dir (
    .clk, .rst_n,
    .rd_en_i(dir_rd_en), .rd_index_i(dir_rd_index),
    .tags_o(dir_tags), .valid_o(dir_valid), .dirty_o(dir_dirty),
    .inst_en_i(dir_inst_en), .inst_index_i(dir_inst_index), .inst_way_i(dir_inst_way),
    .inst_tag_i(dir_inst_tag),
    .dirty_en_i(dirty_en), .dirty_index_i(dirty_index), .dirty_way_i(dirty_way)
  );

  tag_comparator #(.WAYS(WAYS), .TAG_WIDTH(TAG_WIDTH)) u_cmp (
    .tag_i(tag), .tags_i(set_tags), .valid_i(set_valid), .mask_i(mask),
    .hit_o(hit), .miss_o(miss), .hit_way_o(hit_way)
  );

  replacement_algorithm #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH), .NUM_CLOS(NUM_CLOS),
                          .REPL(REPL)) u_repl (
    .clk, .rst_n,
    .hit_valid_i(lookup_done && hit), .miss_valid_i(lookup_done && miss),
    .index_i(index), .clos_i(clos), .mask_i(mask), .hit_way_i(hit_way),
    .ready_o(repl_ready), .victim_valid_o(victim_valid), .victim_way_o(victim_way)
  );

  write_memory_interface #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH)) u_wmi (
    .clk, .rst_n, .index_i(index),
    .evict_valid_i(evict_valid), .evict_way_i(evict_way), .evict_tag_i(evict_tag),
    .evict_dirty_i(evict_dirty),
    .line_rd_o(line_rd), .line_way_o(line_way),
    .line_valid_i(evict_line_valid), .line_i(evict_line),
    .wb_valid_o(wb_valid), .wb_ready_i(wb_ready), .wb_addr_o(wb_addr), .wb_data_o(wb_data),
    .done_o(wmi_done), .done_way_o(wmi_done_way), .wrote_back_o(wrote_back)
  );

  read_memory_interface #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH)) u_rmi (
    .clk, .rst_n, .index_i(index), .tag_i(tag),
    .start_i(wmi_done), .way_i(wmi_done_way),
    .rd_valid_o(rd_valid), .rd_ready_i(rd_ready), .rd_addr_o(rd_addr),
    .rd_rsp_valid_i(rd_rsp_valid), .rd_rsp_data_i(rd_rsp_data),
    .fill_o(fill), .fill_way_o(fill_way), .fill_line_o(fill_line)
  );

  data_interface #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH)) u_data_if (
    .clk, .rst_n, .index_i(index), .word_i(word), .write_i(write), .wdata_i(wdata),
    .hit_i(lookup_done && hit), .hit_way_i(hit_way),
    .evict_rd_i(line_rd), .evict_way_i(line_way),
    .evict_line_valid_o(evict_line_valid), .evict_line_o(evict_line),
    .fill_i(fill), .fill_way_i(fill_way), .fill_line_i(fill_line),
    .done_o(done), .done_hit_o(done_hit), .rdata_o(rdata),
    .ram_rd_en_o(ram_rd_en), .ram_rd_index_o(ram_rd_index), .ram_rd_way_o(ram_rd_way),
    .ram_rdata_i(ram_rdata),
    .ram_wr_en_o(ram_wr_en), .ram_wr_index_o(ram_wr_index), .ram_wr_way_o(ram_wr_way),
    .ram_wdata_o(ram_wdata),
    .dirty_en_o(dirty_en), .dirty_index_o(dirty_index), .dirty_way_o(dirty_way)
  );

  data_block_selector #(.WAYS(WAYS), .INDEX_WIDTH(INDEX_WIDTH)) u_data (
    .clk, .rst_n,
    .rd_en_i(ram_rd_en), .rd_index_i(ram_rd_index), .rd_way_i(ram_rd_way), .rdata_o(ram_rdata),
    .wr_en_i(ram_wr_en), .wr_index_i(ram_wr_index), .wr_way_i(ram_wr_way), .wdata_i(ram_wdata)
  );

  // The victim always lies inside the requester's partition.
  a_victim_in_mask: assert property (@(posedge clk) disable iff (!rst_n)
    victim_valid |-> mask[victim_way]);

  logic unused;
  assign unused = ^{set_dirty, wrote_back};
endmodule
