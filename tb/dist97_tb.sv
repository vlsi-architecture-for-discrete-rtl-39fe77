// dist97_tb: checks the (9,7) distributed part, Type-I and Type-II, each as
// first drawn (RETIME = 0) and retimed (RETIME = 1), against a tap-by-tap
// model of Q(z) and R(z).
//
// Random polyphase inputs are applied with random gaps in en. The expected
// outputs use coefficients rounded here from the decimal values of t1, t2
// and t3 (x128), a product rule of floor(c*a/128), and the history of the
// accepted inputs (zero before the first):
//   Type-I : L = ue[m] + ue[m-2] + t2*ue[m-1] + t1*(uo[m] + uo[m-1])
//            H = ve[m-1] + ve[m-2] + t3*vo[m-1]
//   Type-II: L = ue[m] + ue[m-2] + t2*ue[m-1] + t1*(uo[m-1] + uo[m-2])
//            H = ve[m-1] + ve[m-2] + t3*vo[m-2]
// Retimed, L is unchanged and H is one sample earlier:
//   Type-I : H = ve[m] + ve[m-1] + t3*vo[m]
//   Type-II: H = ve[m] + ve[m-1] + t3*vo[m-1]
// compared modulo 2^16.
module dist97_tb;
  import dwt_pkg::*;

  localparam int M = 400;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t ue = '0, uo = '0, ve = '0, vo = '0;
  word_t l1, h1, l2, h2, l3, h3, l4, h4;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  dist97 #(.TYPE(POLY_TYPE1), .RETIME(1'b0)) dut1 (.clk, .rst_n, .en, .ue, .uo, .ve, .vo, .l(l1), .h(h1));
  dist97 #(.TYPE(POLY_TYPE2), .RETIME(1'b0)) dut2 (.clk, .rst_n, .en, .ue, .uo, .ve, .vo, .l(l2), .h(h2));
  dist97 #(.TYPE(POLY_TYPE1), .RETIME(1'b1)) dut3 (.clk, .rst_n, .en, .ue, .uo, .ve, .vo, .l(l3), .h(h3));
  dist97 #(.TYPE(POLY_TYPE2), .RETIME(1'b1)) dut4 (.clk, .rst_n, .en, .ue, .uo, .ve, .vo, .l(l4), .h(h4));

  int hue[0:M-1], huo[0:M-1], hve[0:M-1], hvo[0:M-1];
  int ct1, ct2, ct3;

  function automatic int q(input real v);
    return int'($floor(v * 128.0 + 0.5));
  endfunction

  function automatic int mul(input int c, input int a);
    longint p = longint'(c) * longint'(a);
    return int'(p >>> 7);
  endfunction

  function automatic int at(ref int h[0:M-1], input int i);
    return (i < 0) ? 0 : h[i];
  endfunction

  task automatic chk(input string what, input word_t got, input int want);
    checks++;
    if (got != word_t'(want)) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, word_t'(want));
    end
  endtask

  initial begin
    automatic int m = 0;
    ct1 = q(-4.630464); ct2 = q(9.597484); ct3 = q(3.369536);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      ue = word_t'($urandom_range(0, 16000) - 8000);
      uo = word_t'($urandom_range(0, 16000) - 8000);
      ve = word_t'($urandom_range(0, 16000) - 8000);
      vo = word_t'($urandom_range(0, 16000) - 8000);
      if (en) begin
        hue[m] = int'(ue); huo[m] = int'(uo); hve[m] = int'(ve); hvo[m] = int'(vo);
        #1;
        chk("T1 L", l1, at(hue, m) + at(hue, m-2) + mul(ct2, at(hue, m-1))
                        + mul(ct1, at(huo, m) + at(huo, m-1)));
        chk("T1 H", h1, at(hve, m-1) + at(hve, m-2) + mul(ct3, at(hvo, m-1)));
        chk("T2 L", l2, at(hue, m) + at(hue, m-2) + mul(ct2, at(hue, m-1))
                        + mul(ct1, at(huo, m-1) + at(huo, m-2)));
        chk("T2 H", h2, at(hve, m-1) + at(hve, m-2) + mul(ct3, at(hvo, m-2)));
        chk("T1r L", l3, at(hue, m) + at(hue, m-2) + mul(ct2, at(hue, m-1))
                         + mul(ct1, at(huo, m) + at(huo, m-1)));
        chk("T1r H", h3, at(hve, m) + at(hve, m-1) + mul(ct3, at(hvo, m)));
        chk("T2r L", l4, at(hue, m) + at(hue, m-2) + mul(ct2, at(hue, m-1))
                         + mul(ct1, at(huo, m-1) + at(huo, m-2)));
        chk("T2r H", h4, at(hve, m) + at(hve, m-1) + mul(ct3, at(hvo, m-1)));
        m++;
      end
    end
    @(negedge clk);
    en = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
