// bspline610: B-spline factorized architecture of the (6,10) DWT filter pair
// (Type-I polyphase form).
//
// The (6,10) analysis filters factor as
//   H(z) = (1+z^-1)^3 (1 + s3 z^-1 + z^-2) h0
//   G(z) = (1-z^-1)^3 (1-z^-1)^2 S(z) g0 = (1-z^-1)^3 R'(z) g0
//   S(z)  = 1 + s1 z^-1 + s2 z^-2 + s1 z^-3 + z^-4
//   R'(z) = 1 + r1 z^-1 + r2 z^-2 + r3 z^-3 + r2 z^-4 + r1 z^-5 + z^-6
// with s1 = 4.630464, s2 = 9.597484, s3 = -3.369536, r1 = 2.630464,
// r2 = 1.336557, r3 = -9.934042. The Pascal stage (pascal_bspline3) covers
// only (1+/-z^-1)^3; the remaining (1-z^-1)^2 of the highpass is handled in
// one of two ways, chosen by SOLUTION:
//   1: a separate multiplier-free (1-z^-1)^2 stage (diff2_poly) followed by
//      S(z) (dist610_hp_sol1): 3 multipliers, 20 adders;
//   2: the merged filter R'(z) (dist610_hp_sol2): 4 multipliers, 18 adders.
// Both solutions share the Pascal stage and the lowpass part (dist610_lp).
// The normalization gains h0 and g0 are not applied.
//
// Outputs, with x[n] = 0 for n < 0 and n counting accepted samples:
//   out_l[m] = sum_k hq[k] x[2m-k],  hq = z^-D (1+z^-1)^3 (1 + s3 z^-1 + z^-2)
//   out_h[m] = sum_k gq[k] x[2m-k],  gq = z^-P (1-z^-1)^5 S(z)
// in 16-bit fixed point (the two solutions differ only in rounding), where
// D = 0 with RETIME = 1 (default) and D = 2 with RETIME = 0, and P = 2 with
// PIPE = 1, else 0.
//
// RETIME = 1 removes the common leading delay of the lowpass sub-filters
// (see dist610_lp), which saves two registers and makes the critical path
// run through the highpass chain. PIPE = 1 (Solution-1 only) is the
// pipelining cut in front of S(z): one register on each of the two
// (1-z^-1)^2 outputs. It shortens the highpass path and delays the highpass
// by one output sample. Decimated-rate register counts: 12 (RETIME = 0),
// 10 (RETIME = 1), 12 (RETIME = 1, PIPE = 1), 14 (RETIME = 0, PIPE = 1).
//
// Timing: as bspline97; out_valid rises two cycles after the in_valid cycle
// of every even-indexed sample x[2m].
//
// The polyphase forms, row filters, sub-filters, the retiming and the
// pipelining cut follow the published architecture; the input/output
// registers, the valid signalling and the register that keeps 3*o (one more
// than the published counts, in exchange for one adder fewer) are choices of
// this design.
module bspline610
  import dwt_pkg::*;
#(
  parameter int unsigned SOLUTION = 1,
  parameter bit          RETIME   = 1'b1,
  parameter bit          PIPE     = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_x,
  output logic  out_valid,
  output word_t out_l,
  output word_t out_h
);

  if (SOLUTION != 1 && SOLUTION != 2) begin : g_bad_solution
    $error("bspline610: SOLUTION must be 1 or 2");
  end
  if (SOLUTION == 2 && PIPE) begin : g_bad_pipe
    $error("bspline610: the pipelining cut exists only in Solution-1");
  end

  logic  pv;
  word_t pe, po;

  polyphase_split #(.TYPE(POLY_TYPE1)) u_split (
    .clk, .rst_n, .in_valid, .in_x,
    .pair_valid(pv), .pair_even(pe), .pair_odd(po)
  );

  word_t ue, ve, uo, vo;

  pascal_bspline3 u_pascal (
    .clk, .rst_n, .en(pv), .e(pe), .o(po),
    .ue, .ve, .uo, .vo
  );

  word_t l, h;

  dist610_lp #(.RETIME(RETIME)) u_lp (
    .clk, .rst_n, .en(pv), .ue, .uo, .l
  );

  if (SOLUTION == 1) begin : g_sol1
    word_t we, wo, d_we, d_wo;

    diff2_poly u_diff2 (
      .clk, .rst_n, .en(pv), .ve, .vo, .we, .wo
    );

    if (PIPE) begin : g_pipe
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          d_we <= '0; d_wo <= '0;
        end else if (pv) begin
          d_we <= we; d_wo <= wo;
        end
      end
    end else begin : g_nopipe
      assign d_we = we;
      assign d_wo = wo;
    end

    dist610_hp_sol1 u_hp (
      .clk, .rst_n, .en(pv), .we(d_we), .wo(d_wo), .h
    );
  end else begin : g_sol2
    dist610_hp_sol2 u_hp (
      .clk, .rst_n, .en(pv), .ve, .vo, .h
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_l     <= '0;
      out_h     <= '0;
    end else begin
      out_valid <= pv;
      if (pv) begin
        out_l <= l;
        out_h <= h;
      end
    end
  end

endmodule
