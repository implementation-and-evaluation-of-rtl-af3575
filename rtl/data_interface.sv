// data_interface: the single entry to the data RAM (data_block_selector).
//
// Three operations, each started by a one-cycle pulse, one at a time:
//   hit_i    Read the line (index_i, hit_way_i). One clock later the addressed
//            word is returned (done_o, rdata_o); for a write the word is
//            merged into the line, the line written back and its dirty bit
//            set, and the written word is returned.
//   evict_rd_i  Read the line (index_i, evict_way_i) for a write-back; one
//            clock later evict_line_valid_o pulses with the line.
//   fill_i   Insert the line fetched from memory into (index_i, fill_way_i),
//            merging the write data first for a write miss and then setting
//            the dirty bit. One clock later done_o pulses with the word.
// done_hit_o tells the processor interface whether done_o ends a hit.
// Word selection by the address offset, and the merge of write data into a
// fetched line, are this design's choices; setting the dirty bit here and
// returning written data to the requester follow the document.
module data_interface #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  localparam int LINE_BITS  = cache_pkg::LINE_BITS,
  localparam int WORD_BITS  = cache_pkg::WORD_BITS,
  localparam int WORD_SEL_BITS = cache_pkg::WORD_SEL_BITS,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // request fields, held stable by the processor interface
  input  logic [INDEX_WIDTH-1:0]   index_i,
  input  logic [WORD_SEL_BITS-1:0] word_i,
  input  logic                     write_i,
  input  logic [WORD_BITS-1:0]     wdata_i,
  // hit access
  input  logic                     hit_i,
  input  logic [WAY_BITS-1:0]      hit_way_i,
  // line read for write-back
  input  logic                     evict_rd_i,
  input  logic [WAY_BITS-1:0]      evict_way_i,
  output logic                     evict_line_valid_o,
  output logic [LINE_BITS-1:0]     evict_line_o,
  // line fill
  input  logic                     fill_i,
  input  logic [WAY_BITS-1:0]      fill_way_i,
  input  logic [LINE_BITS-1:0]     fill_line_i,
  // completion
  output logic                     done_o,
  output logic                     done_hit_o,
  output logic [WORD_BITS-1:0]     rdata_o,
  // data_block_selector ports
  output logic                     ram_rd_en_o,
  output logic [INDEX_WIDTH-1:0]   ram_rd_index_o,
  output logic [WAY_BITS-1:0]      ram_rd_way_o,
  input  logic [LINE_BITS-1:0]     ram_rdata_i,
  output logic                     ram_wr_en_o,
  output logic [INDEX_WIDTH-1:0]   ram_wr_index_o,
  output logic [WAY_BITS-1:0]      ram_wr_way_o,
  output logic [LINE_BITS-1:0]     ram_wdata_o,
  // dirty bit in the status bits directory
  output logic                     dirty_en_o,
  output logic [INDEX_WIDTH-1:0]   dirty_index_o,
  output logic [WAY_BITS-1:0]      dirty_way_o
);
  logic                hit_q, evict_q, fill_q;
  logic [WAY_BITS-1:0] way_q;
  logic [LINE_BITS-1:0] merged_hit, merged_fill;
  logic [WORD_BITS-1:0] fill_word_q;

  function automatic logic [LINE_BITS-1:0] merge_word(
      input logic [LINE_BITS-1:0] line, input logic [WORD_SEL_BITS-1:0] sel,
      input logic [WORD_BITS-1:0] word);
    logic [LINE_BITS-1:0] r;
    r = line;
    r[sel*WORD_BITS +: WORD_BITS] = word;
    return r;
  endfunction

  assign merged_hit  = merge_word(ram_rdata_i, word_i, wdata_i);
  assign merged_fill = write_i ? merge_word(fill_line_i, word_i, wdata_i) : fill_line_i;

  // RAM read: hit lookup or eviction read.
  assign ram_rd_en_o    = hit_i || evict_rd_i;
  assign ram_rd_index_o = index_i;
  assign ram_rd_way_o   = hit_i ? hit_way_i : evict_way_i;

  // RAM write: write hit (one clock after its read) or fill.
  always_comb begin
    ram_wr_en_o    = 1'b0;
    ram_wr_index_o = index_i;
    ram_wr_way_o   = way_q;
    ram_wdata_o    = merged_hit;
    if (fill_i) begin
      ram_wr_en_o  = 1'b1;
      ram_wr_way_o = fill_way_i;
      ram_wdata_o  = merged_fill;
    end else if (hit_q && write_i) begin
      ram_wr_en_o  = 1'b1;
    end
  end

  assign dirty_en_o    = write_i && (fill_i || hit_q);
  assign dirty_index_o = index_i;
  assign dirty_way_o   = fill_i ? fill_way_i : way_q;

  assign evict_line_valid_o = evict_q;
  assign evict_line_o       = ram_rdata_i;

  assign done_o     = hit_q || fill_q;
  assign done_hit_o = hit_q;
  assign rdata_o    = write_i ? wdata_i
                    : hit_q   ? ram_rdata_i[word_i*WORD_BITS +: WORD_BITS]
                    : fill_word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q       <= 1'b0;
      evict_q     <= 1'b0;
      fill_q      <= 1'b0;
      way_q       <= '0;
      fill_word_q <= '0;
    end else begin
      hit_q   <= hit_i;
      evict_q <= evict_rd_i;
      fill_q  <= fill_i;
      if (hit_i) way_q <= hit_way_i;
      if (fill_i) fill_word_q <= fill_line_i[word_i*WORD_BITS +: WORD_BITS];
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({hit_i, evict_rd_i, fill_i}));
endmodule
