// dist610_lp_tb: checks the (6,10) lowpass distributed part in both forms
// against models of
//   as drawn (RETIME = 0): L[m] = ue[m-1] + ue[m-2] + floor(s3 * uo[m-1] / 128)
//   retimed  (RETIME = 1): L[m] = ue[m] + ue[m-1] + floor(s3 * uo[m] / 128)
// with s3 = -3.369536 rounded here (x128), inputs random with random gaps in
// en, results compared modulo 2^16.
module dist610_lp_tb;
  import dwt_pkg::*;

  localparam int M = 400;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t ue = '0, uo = '0;
  word_t l_ret, l_raw;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  dist610_lp #(.RETIME(1'b1)) dut_ret (.clk, .rst_n, .en, .ue, .uo, .l(l_ret));
  dist610_lp #(.RETIME(1'b0)) dut_raw (.clk, .rst_n, .en, .ue, .uo, .l(l_raw));

  int hue[0:M-1], huo[0:M-1];
  int cs3;

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
    cs3 = int'($floor(-3.369536 * 128.0 + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      ue = word_t'($urandom_range(0, 16000) - 8000);
      uo = word_t'($urandom_range(0, 16000) - 8000);
      if (en) begin
        hue[m] = int'(ue); huo[m] = int'(uo);
        #1;
        chk("L retimed", l_ret, at(hue, m) + at(hue, m-1) + mul(cs3, at(huo, m)));
        chk("L as drawn", l_raw, at(hue, m-1) + at(hue, m-2) + mul(cs3, at(huo, m-1)));
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
