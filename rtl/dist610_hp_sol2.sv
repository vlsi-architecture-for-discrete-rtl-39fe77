// dist610_hp_sol2: Solution-2 highpass distributed part of the (6,10)
// architecture.
//
// The (1-z^-1)^2 factor is merged into the distributed part:
// R'(z) = (1-z^-1)^2 S(z) = 1 + r1 z^-1 + r2 z^-2 + r3 z^-3 + r2 z^-4
//         + r1 z^-5 + z^-6,
// applied to the polyphase components (ve, vo) of (1-z^-1)^3 x as
// R'0 = [1 r2 r2 1] on ve and R'1 = [r1 r3 r1] on vo:
//   H[m] = ve[m] + ve[m-3] + r2*(ve[m-1] + ve[m-2])
//          + r1*(vo[m] + vo[m-2]) + r3*vo[m-1].
// Equal taps share a multiplier: three 16x12 multipliers (dwt_pkg cmul).
//
// Timing: H is combinational in the inputs and the delay registers, which
// shift when en is high and reset to zero.
//
// The sub-filters follow the published architecture; the coefficient format
// and rounding are choices of this design.
module dist610_hp_sol2
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t ve,
  input  word_t vo,
  output word_t h
);

  word_t ve1, ve2, ve3, vo1, vo2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ve1 <= '0; ve2 <= '0; ve3 <= '0; vo1 <= '0; vo2 <= '0;
    end else if (en) begin
      ve1 <= ve; ve2 <= ve1; ve3 <= ve2;
      vo1 <= vo; vo2 <= vo1;
    end
  end

  assign h = ve + ve3 + cmul(ve1 + ve2, R2) + cmul(vo + vo2, R1) + cmul(vo1, R3);

endmodule
