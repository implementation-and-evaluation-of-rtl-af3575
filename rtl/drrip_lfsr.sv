// drrip_lfsr: 4-bit linear feedback shift register used by BRRIP insertion.
//
// A maximal-length 4-bit Fibonacci LFSR (taps x^4 + x^3 + 1) steps every
// clock cycle through 15 non-zero states. bit_o is 1 in exactly one of them
// (state 4'b1000), so over a period it is 1 one cycle in 15 (about 6.7 %) and
// 0 in the rest (about 93 %), the split the document asks for. The tap choice,
// the decoded state and the reset seed (4'b0001) are this design's choices.
module drrip_lfsr (
  input  logic       clk,
  input  logic       rst_n,
  output logic       bit_o,
  output logic [3:0] state_o
);
  logic [3:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= 4'b0001;
    else        lfsr_q <= {lfsr_q[2:0], lfsr_q[3] ^ lfsr_q[2]};
  end

  assign bit_o   = (lfsr_q == 4'b1000);
  assign state_o = lfsr_q;

  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) lfsr_q != 4'b0000);
endmodule
