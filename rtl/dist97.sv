// dist97: distributed part of the (9,7) architecture and its output adders.
//
// Lowpass Q(z) = 1 + t1 z^-1 + t2 z^-2 + t1 z^-3 + z^-4 acts on the
// polyphase components (ue, uo) of the B-spline lowpass signal, highpass
// R(z) = 1 + t3 z^-1 + z^-2 on (ve, vo). Polyphase sub-filters, with
// [a b c] = a + b z^-1 + c z^-2:
//   Type-I : Q0 = [1 t2 1], Q1 = [t1 t1 0], R0 = [0 1 1], R1 = [0 t3 0]
//   Type-II: Q0 = [1 t2 1], Q1 = [0 t1 t1], R0 = [0 1 1], R1 = [0 0 t3]
// L = Q0*ue + Q1*uo, H = R0*ve + R1*vo. The two equal t1 taps share one
// multiplier (t1 times the sum of the two samples), so the block has three
// multipliers and six adders. Each multiplier is dwt_pkg's 16x12 cmul (Q5.7
// coefficient, product truncated by 2^-7).
//
// RETIME = 0 keeps these sub-filters as drawn: the leading zero of R0/R1
// delays the highpass by one output sample (Type-I: 6 registers here, 10 with
// the Pascal stage). RETIME = 1 applies the retiming cut in front of R0/R1
// (a z^+1 on the highpass side): the common leading delay is removed, so
// R0 = [1 1] and R1 = [t3] (Type-I) or [0 t3] (Type-II), and H comes out one
// output sample earlier. In Type-II the t1 pre-adder is also moved in front
// of its register, so the multiplier is fed from a register: t1 * s[m-1] with
// s = uo + uo1 (same value as uo1 + uo2). Register count with the Pascal
// stage: Type-I 8, Type-II 10.
//
// Timing: L and H are combinational in the inputs and the delay registers,
// which shift when en is high. Registers reset to zero.
//
// The sub-filters, the multiplier sharing and the register counts of both
// forms follow the published architecture; the exact placement of the
// retimed registers is derived here from the retiming cut, and the
// coefficient format and rounding are choices of this design.
module dist97
  import dwt_pkg::*;
#(
  parameter poly_type_e TYPE   = POLY_TYPE1,
  parameter bit         RETIME = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t ue,
  input  word_t uo,
  input  word_t ve,
  input  word_t vo,
  output word_t l,
  output word_t h
);

  // Q0 = [1 t2 1], common to every form
  word_t ue1, ue2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ue1 <= '0; ue2 <= '0;
    end else if (en) begin
      ue1 <= ue; ue2 <= ue1;
    end
  end

  word_t q0, q1, r0, r1;

  assign q0 = ue + ue2 + cmul(ue1, T2);

  if (TYPE == POLY_TYPE1) begin : g_type1
    word_t uo1;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  uo1 <= '0;
      else if (en) uo1 <= uo;
    end
    assign q1 = cmul(uo + uo1, T1);                 // [t1 t1 0]

    if (RETIME) begin : g_ret
      word_t ve1;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  ve1 <= '0;
        else if (en) ve1 <= ve;
      end
      assign r0 = ve + ve1;                          // [1 1]
      assign r1 = cmul(vo, T3);                      // [t3]
    end else begin : g_noret
      word_t ve1, ve2, vo1;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          ve1 <= '0; ve2 <= '0; vo1 <= '0;
        end else if (en) begin
          ve1 <= ve; ve2 <= ve1; vo1 <= vo;
        end
      end
      assign r0 = ve1 + ve2;                         // [0 1 1]
      assign r1 = cmul(vo1, T3);                     // [0 t3 0]
    end
  end else begin : g_type2
    if (RETIME) begin : g_ret
      word_t uo1, us1, ve1, vo1;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          uo1 <= '0; us1 <= '0; ve1 <= '0; vo1 <= '0;
        end else if (en) begin
          uo1 <= uo;
          us1 <= uo + uo1;                           // pre-adder before the register
          ve1 <= ve;
          vo1 <= vo;
        end
      end
      assign q1 = cmul(us1, T1);                     // [0 t1 t1]
      assign r0 = ve + ve1;                          // [1 1]
      assign r1 = cmul(vo1, T3);                     // [0 t3]
    end else begin : g_noret
      word_t uo1, uo2, ve1, ve2, vo1, vo2;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          uo1 <= '0; uo2 <= '0; ve1 <= '0; ve2 <= '0; vo1 <= '0; vo2 <= '0;
        end else if (en) begin
          uo1 <= uo; uo2 <= uo1;
          ve1 <= ve; ve2 <= ve1;
          vo1 <= vo; vo2 <= vo1;
        end
      end
      assign q1 = cmul(uo1 + uo2, T1);               // [0 t1 t1]
      assign r0 = ve1 + ve2;                         // [0 1 1]
      assign r1 = cmul(vo2, T3);                     // [0 0 t3]
    end
  end

  assign l = q0 + q1;
  assign h = r0 + r1;

endmodule
