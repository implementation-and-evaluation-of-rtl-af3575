// tag_comparator: tag and valid comparison for one set, restricted to the
// requester's partition.
//
// Combinational. The request tag is compared in parallel with the tag of
// every way; a way matches when its tag is equal, its valid bit is set and
// its bit in the partition mask is set. hit_o is high and miss_o low when a
// way matches, and hit_way_o names it; otherwise miss_o is high. Ways outside
// the partition can never hit. This follows the document; if several ways
// were to match, the lowest-numbered one is reported (this design's choice).
module tag_comparator #(
  parameter int WAYS        = 8,
  parameter int TAG_WIDTH   = 35,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic [TAG_WIDTH-1:0]            tag_i,
  input  logic [WAYS-1:0][TAG_WIDTH-1:0]  tags_i,
  input  logic [WAYS-1:0]                 valid_i,
  input  logic [WAYS-1:0]                 mask_i,
  output logic                            hit_o,
  output logic                            miss_o,
  output logic [WAY_BITS-1:0]             hit_way_o
);
  logic [WAYS-1:0] match;

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      match[w] = valid_i[w] && mask_i[w] && (tags_i[w] == tag_i);
    hit_way_o = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (match[w]) hit_way_o = WAY_BITS'(w);
  end

  assign hit_o  = |match;
  assign miss_o = ~hit_o;
endmodule
