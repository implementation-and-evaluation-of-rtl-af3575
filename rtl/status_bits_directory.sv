// status_bits_directory: valid and dirty bits of every cache line.
//
// Two banks, one of valid bits and one of dirty bits, each with one row per
// set and one bit per way. Reset clears both banks, which empties the cache.
// A read presents a set index and, one clock later, valid_o and dirty_o hold
// that set's bits until the next read. Two write ports update single lines:
//   install (inst_en_i): the line has just been given a new tag, so its valid
//     bit is set and its dirty bit cleared;
//   dirty   (dirty_en_i): the line has been written, so its dirty bit is set.
// The two banks and the reset behaviour follow the document; the split into
// these two write ports is this design's choice. If both ports name the same
// line in one cycle, the dirty port wins.
module status_bits_directory #(
  parameter int WAYS        = 8,
  parameter int INDEX_WIDTH = 8,
  localparam int WAY_BITS   = $clog2(WAYS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rd_en_i,
  input  logic [INDEX_WIDTH-1:0] rd_index_i,
  output logic [WAYS-1:0]        valid_o,
  output logic [WAYS-1:0]        dirty_o,
  input  logic                   inst_en_i,
  input  logic [INDEX_WIDTH-1:0] inst_index_i,
  input  logic [WAY_BITS-1:0]    inst_way_i,
  input  logic                   dirty_en_i,
  input  logic [INDEX_WIDTH-1:0] dirty_index_i,
  input  logic [WAY_BITS-1:0]    dirty_way_i
);
  localparam int SETS = 1 << INDEX_WIDTH;

  logic [WAYS-1:0] valid_bank [SETS];
  logic [WAYS-1:0] dirty_bank [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_bank[s] <= '0;
        dirty_bank[s] <= '0;
      end
      valid_o <= '0;
      dirty_o <= '0;
    end else begin
      if (rd_en_i) begin
        valid_o <= valid_bank[rd_index_i];
        dirty_o <= dirty_bank[rd_index_i];
      end
      if (inst_en_i) begin
        valid_bank[inst_index_i][inst_way_i] <= 1'b1;
        dirty_bank[inst_index_i][inst_way_i] <= 1'b0;
      end
      if (dirty_en_i) dirty_bank[dirty_index_i][dirty_way_i] <= 1'b1;
    end
  end
endmodule
