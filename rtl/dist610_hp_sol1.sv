// dist610_hp_sol1: Solution-1 highpass distributed part of the (6,10)
// architecture.
//
// S(z) = 1 + s1 z^-1 + s2 z^-2 + s1 z^-3 + z^-4 on the polyphase components
// (we, wo) of (1-z^-1)^5 x: R0 = [1 s2 1] on we, R1 = [s1 s1] on wo,
//   H[m] = we[m] + we[m-2] + s2*we[m-1] + s1*(wo[m] + wo[m-1]).
// The two s1 taps share a multiplier: two 16x12 multipliers (dwt_pkg cmul)
// and five adders.
//
// Timing: H is combinational in the inputs and the delay registers, which
// shift when en is high and reset to zero.
//
// The sub-filters follow the published architecture; the coefficient format
// and rounding are choices of this design.
module dist610_hp_sol1
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t we,
  input  word_t wo,
  output word_t h
);

  word_t we1, we2, wo1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we1 <= '0; we2 <= '0; wo1 <= '0;
    end else if (en) begin
      we1 <= we; we2 <= we1; wo1 <= wo;
    end
  end

  assign h = we + we2 + cmul(we1, S2) + cmul(wo + wo1, S1);

endmodule
