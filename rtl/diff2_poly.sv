// diff2_poly: the (1-z^-1)^2 factor of the (6,10) highpass in Solution-1,
// applied in polyphase form after the (1-z^-1)^3 Pascal stage.
//
// With w = (1-z^-1)^2 v and (ve, vo) the polyphase components of v:
//   we = [1 1] ve + [-2] vo        = ve[m] + ve[m-1] - 2 vo[m]
//   wo = [0 -2] ve + [1 1] vo      = vo[m] + vo[m-1] - 2 ve[m-1]
// No multipliers: the factor 2 is a shift.
//
// Timing: outputs are combinational in the inputs and two registers that
// shift when en is high; registers reset to zero.
//
// The four small filters and their pairing follow the published
// architecture.
module diff2_poly
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t ve,
  input  word_t vo,
  output word_t we,
  output word_t wo
);

  word_t ve1, vo1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ve1 <= '0; vo1 <= '0;
    end else if (en) begin
      ve1 <= ve; vo1 <= vo;
    end
  end

  assign we = ve + ve1 - (vo <<< 1);
  assign wo = vo + vo1 - (ve1 <<< 1);

endmodule
