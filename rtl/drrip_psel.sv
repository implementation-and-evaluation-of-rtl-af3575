// drrip_psel: policy-selection counter for DRRIP set dueling.
//
// A 2-bit saturating counter. A hit in an SRRIP leader set increments it, a
// hit in a BRRIP leader set decrements it; follower sets use SRRIP when the
// most significant bit is 1 and BRRIP when it is 0. Width, direction and the
// meaning of the MSB follow the document; the reset value 2'b10 (weakly
// SRRIP) is this design's choice. Both inputs in one cycle cancel.
module drrip_psel (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       inc_i,
  input  logic       dec_i,
  output logic       use_srrip_o,
  output logic [1:0] count_o
);
  logic [1:0] psel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) psel_q <= 2'b10;
    else if (inc_i && !dec_i && psel_q != 2'b11) psel_q <= psel_q + 2'd1;
    else if (dec_i && !inc_i && psel_q != 2'b00) psel_q <= psel_q - 2'd1;
  end

  assign use_srrip_o = psel_q[1];
  assign count_o     = psel_q;
endmodule
