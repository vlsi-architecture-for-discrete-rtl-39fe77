// bspline97: B-spline factorized architecture of the (9,7) DWT filter pair.
//
// The (9,7) analysis filters factor as
//   H(z) = (1+z^-1)^4 (1 + t1 z^-1 + t2 z^-2 + t1 z^-3 + z^-4) h0
//   G(z) = (1-z^-1)^4 (1 + t3 z^-1 + z^-2) g0
// with t1 = -4.630464, t2 = 9.597484, t3 = 3.369536. The input is split into
// polyphase pairs (polyphase_split), the multiplier-free B-spline factors are
// computed by the Pascal stage (pascal_bspline4) and the only multipliers,
// three of them, sit in the distributed part (dist97). The normalization
// gains h0 and g0 are not applied: they are left to a following scaler or
// quantizer.
//
// Outputs, with x[n] = 0 for n < 0 and n counting accepted samples from
// reset:
//   out_l[m] = sum_k hq[k] x[2m-k],   hq = (1+z^-1)^4 Q(z)
//   out_h[m] = sum_k gq[k] x[2m-k],   gq = z^-D (1-z^-1)^4 R(z)
// in 16-bit fixed point (dwt_pkg), with D = 0 when RETIME = 1 (default) and
// D = 2 when RETIME = 0. TYPE selects the Type-I or Type-II polyphase form;
// both give the same output sequence, Type-II one input sample later (it
// needs x[2m+1] to complete pair m).
//
// RETIME = 1 is the retimed datapath: 8 decimated-rate registers in Type-I,
// 10 in Type-II; RETIME = 0 is the datapath as first drawn (10 and 12). See
// dist97 for where the registers move. PIPE = 1 adds the pipelining cut: a
// register stage on the four signals between the Pascal butterfly and the
// distributed part (12 registers for retimed Type-I). It takes the
// Pascal-stage adders off the path through the multipliers and delays both
// outputs by one output sample.
//
// Timing: one output pair per two input samples. out_valid rises two clock
// cycles after the in_valid cycle of the sample that completes a pair (one
// cycle in polyphase_split, one in the output register). Input gaps are
// allowed; nothing moves while no pair completes.
//
// The polyphase forms, row filters, sub-filters and register counts follow
// the published architecture; the input/output registers, the valid
// signalling and the exact position of the pipeline stage are choices of
// this design.
module bspline97
  import dwt_pkg::*;
#(
  parameter poly_type_e TYPE   = POLY_TYPE1,
  parameter bit         RETIME = 1'b1,
  parameter bit         PIPE   = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_x,
  output logic  out_valid,
  output word_t out_l,
  output word_t out_h
);

  logic  pv;
  word_t pe, po;

  polyphase_split #(.TYPE(TYPE)) u_split (
    .clk, .rst_n, .in_valid, .in_x,
    .pair_valid(pv), .pair_even(pe), .pair_odd(po)
  );

  word_t ue, ve, uo, vo;

  pascal_bspline4 #(.TYPE(TYPE)) u_pascal (
    .clk, .rst_n, .en(pv), .e(pe), .o(po),
    .ue, .ve, .uo, .vo
  );

  word_t d_ue, d_ve, d_uo, d_vo;

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_ue <= '0; d_ve <= '0; d_uo <= '0; d_vo <= '0;
      end else if (pv) begin
        d_ue <= ue; d_ve <= ve; d_uo <= uo; d_vo <= vo;
      end
    end
  end else begin : g_nopipe
    assign d_ue = ue;
    assign d_ve = ve;
    assign d_uo = uo;
    assign d_vo = vo;
  end

  word_t l, h;

  dist97 #(.TYPE(TYPE), .RETIME(RETIME)) u_dist (
    .clk, .rst_n, .en(pv),
    .ue(d_ue), .uo(d_uo), .ve(d_ve), .vo(d_vo),
    .l, .h
  );

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
