// dist610_lp: lowpass distributed part of the (6,10) architecture.
//
// Q(z) = 1 + s3 z^-1 + z^-2 on the polyphase components (ue, uo) of the
// (1+z^-1)^3 output. As drawn, Q0 = [0 1 1] on ue and Q1 = [0 s3] on uo:
//   L[m] = ue[m-1] + ue[m-2] + s3 * uo[m-1]           (RETIME = 0)
// and the leading delay centres the lowpass on the same input sample as the
// highpass. The retimed form (RETIME = 1, default) cuts that common delay out
// of both sub-filters, Q0 = [1 1], Q1 = [s3]:
//   L[m] = ue[m] + ue[m-1] + s3 * uo[m]               (RETIME = 1)
// which saves two registers and gives the lowpass one output sample earlier.
// One 16x12 multiplier (dwt_pkg cmul), two adders.
//
// Timing: L is combinational in the inputs (RETIME = 1) or a function of
// registers only (RETIME = 0); registers shift when en is high and reset to
// zero.
//
// The sub-filters and the register counts of both forms follow the published
// architecture; the coefficient format and rounding are choices of this
// design.
module dist610_lp
  import dwt_pkg::*;
#(
  parameter bit RETIME = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t ue,
  input  word_t uo,
  output word_t l
);

  if (RETIME) begin : g_ret
    word_t ue1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  ue1 <= '0;
      else if (en) ue1 <= ue;
    end
    assign l = ue + ue1 + cmul(uo, S3);
  end else begin : g_noret
    word_t ue1, ue2, uo1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ue1 <= '0; ue2 <= '0; uo1 <= '0;
      end else if (en) begin
        ue1 <= ue; ue2 <= ue1; uo1 <= uo;
      end
    end
    assign l = ue1 + ue2 + cmul(uo1, S3);
  end

endmodule
