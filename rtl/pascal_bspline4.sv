// pascal_bspline4: B-spline part of the (9,7) architecture, (1+z^-1)^4 for
// the lowpass and (1-z^-1)^4 for the highpass, on a polyphase input pair.
//
// Pascal implementation: the even-power taps 1+6z^-2+z^-4 and the odd-power
// taps 4z^-1+4z^-3 are formed once per polyphase branch; their sum is the
// (1+z^-1)^4 output and their difference the (1-z^-1)^4 output. Constant
// factors use shifts and adds only (6a = 4a + 2a, 4a + 4b = 4(a+b)), which
// gives 12 adders in all. At the decimated rate the four partial sums are
//   Type-I : row1 = [1 6 1]e, row2 = [4 4 0]o, row3 = [1 6 1]o, row4 = [0 4 4]e
//   Type-II: row1 = [1 6 1]e, row2 = [0 4 4]o, row3 = [1 6 1]o, row4 = [4 4 0]e
// ([a b c] means a + b z^-1 + c z^-2) and the butterfly gives
//   ue = row1+row2, ve = row1-row2, uo = row3+row4, vo = row3-row4,
// the even/odd polyphase components of the lowpass (u) and highpass (v)
// B-spline outputs.
//
// Timing: outputs are combinational in (e, o) and the two-deep delay lines,
// which shift when en is high (one step per input pair). Delay lines reset
// to zero.
//
// The row filters and the butterfly follow the published architecture; the
// particular shift-and-add decomposition is this design's choice.
module pascal_bspline4
  import dwt_pkg::*;
#(
  parameter poly_type_e TYPE = POLY_TYPE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t e,
  input  word_t o,
  output word_t ue,
  output word_t ve,
  output word_t uo,
  output word_t vo
);

  word_t e1, e2, o1, o2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0; e2 <= '0; o1 <= '0; o2 <= '0;
    end else if (en) begin
      e1 <= e;  e2 <= e1;
      o1 <= o;  o2 <= o1;
    end
  end

  word_t row1, row2, row3, row4;

  always_comb begin
    row1 = e + e2 + (e1 <<< 2) + (e1 <<< 1);     // [1 6 1] on e
    row3 = o + o2 + (o1 <<< 2) + (o1 <<< 1);     // [1 6 1] on o
    if (TYPE == POLY_TYPE1) begin
      row2 = (o + o1) <<< 2;                     // [4 4 0] on o
      row4 = (e1 + e2) <<< 2;                    // [0 4 4] on e
    end else begin
      row2 = (o1 + o2) <<< 2;                    // [0 4 4] on o
      row4 = (e + e1) <<< 2;                     // [4 4 0] on e
    end
    ue = row1 + row2;
    ve = row1 - row2;
    uo = row3 + row4;
    vo = row3 - row4;
  end

endmodule
