// pascal_bspline3: B-spline part of the (6,10) architecture, (1+z^-1)^3 for
// the lowpass and (1-z^-1)^3 for the highpass, Type-I polyphase form.
//
// (1+/-z^-1)^3 = (1 + 3z^-2) +/- (3z^-1 + z^-3). At the decimated rate the
// partial sums are
//   row1 = [1 3]e, row2 = [3 1]o, row3 = [1 3]o, row4 = [0 3 1]e
// and the butterfly gives ue = row1+row2, ve = row1-row2, uo = row3+row4,
// vo = row3-row4. The product 3*e[m-1] is formed once and used by rows 1
// and 4; 3*o is formed once and used by row 2 directly and, one pair later,
// by row 3 from a register. 3a = 2a + a.
//
// Timing: outputs are combinational in (e, o) and the delay registers, which
// shift when en is high. Registers reset to zero.
//
// The row filters, the butterfly and the shared 3x terms follow the
// published architecture; the register that carries 3*o is this design's
// way of sharing it.
module pascal_bspline3
  import dwt_pkg::*;
(
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

  word_t e1, e2, o1, o3x1;
  word_t e3x1, o3x;

  assign o3x  = (o <<< 1) + o;
  assign e3x1 = (e1 <<< 1) + e1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1 <= '0; e2 <= '0; o1 <= '0; o3x1 <= '0;
    end else if (en) begin
      e1   <= e;
      e2   <= e1;
      o1   <= o;
      o3x1 <= o3x;             // 3*o[m-1], shared with row 2
    end
  end

  word_t row1, row2, row3, row4;

  always_comb begin
    row1 = e + e3x1;           // [1 3] on e
    row2 = o3x + o1;           // [3 1] on o
    row3 = o + o3x1;           // [1 3] on o
    row4 = e3x1 + e2;          // [0 3 1] on e
    ue = row1 + row2;
    ve = row1 - row2;
    uo = row3 + row4;
    vo = row3 - row4;
  end

endmodule
