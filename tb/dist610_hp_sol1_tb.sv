// dist610_hp_sol1_tb: checks the Solution-1 highpass distributed part S(z)
// against a model of R0 = [1 s2 1], R1 = [s1 s1]:
//   H[m] = we[m] + we[m-2] + floor(s2*we[m-1]/128)
//          + floor(s1*(wo[m] + wo[m-1])/128)
// with s1 = 4.630464 and s2 = 9.597484 rounded here (x128), random inputs
// with random gaps in en, results compared modulo 2^16.
module dist610_hp_sol1_tb;
  import dwt_pkg::*;

  localparam int M = 400;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t we = '0, wo = '0;
  word_t h;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  dist610_hp_sol1 dut (.clk, .rst_n, .en, .we, .wo, .h);

  int hwe[0:M-1], hwo[0:M-1];
  int cs1, cs2;

  function automatic int mul(input int c, input int a);
    longint p = longint'(c) * longint'(a);
    return int'(p >>> 7);
  endfunction

  function automatic int at(ref int hh[0:M-1], input int i);
    return (i < 0) ? 0 : hh[i];
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
    cs1 = int'($floor(4.630464 * 128.0 + 0.5));
    cs2 = int'($floor(9.597484 * 128.0 + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      we = word_t'($urandom_range(0, 16000) - 8000);
      wo = word_t'($urandom_range(0, 16000) - 8000);
      if (en) begin
        hwe[m] = int'(we); hwo[m] = int'(wo);
        #1;
        chk("H", h, at(hwe, m) + at(hwe, m-2) + mul(cs2, at(hwe, m-1))
                    + mul(cs1, at(hwo, m) + at(hwo, m-1)));
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
