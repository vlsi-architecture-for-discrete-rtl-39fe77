// dist610_hp_sol2_tb: checks the Solution-2 highpass distributed part R'(z)
// against a model of R'0 = [1 r2 r2 1], R'1 = [r1 r3 r1]:
//   H[m] = ve[m] + ve[m-3] + floor(r2*(ve[m-1] + ve[m-2])/128)
//          + floor(r1*(vo[m] + vo[m-2])/128) + floor(r3*vo[m-1]/128)
// with r1 = 2.630464, r2 = 1.336557, r3 = -9.934042 rounded here (x128),
// random inputs with random gaps in en, results compared modulo 2^16.
module dist610_hp_sol2_tb;
  import dwt_pkg::*;

  localparam int M = 400;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t ve = '0, vo = '0;
  word_t h;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  dist610_hp_sol2 dut (.clk, .rst_n, .en, .ve, .vo, .h);

  int hve[0:M-1], hvo[0:M-1];
  int cr1, cr2, cr3;

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
    cr1 = int'($floor(2.630464 * 128.0 + 0.5));
    cr2 = int'($floor(1.336557 * 128.0 + 0.5));
    cr3 = int'($floor(-9.934042 * 128.0 + 0.5));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      ve = word_t'($urandom_range(0, 16000) - 8000);
      vo = word_t'($urandom_range(0, 16000) - 8000);
      if (en) begin
        hve[m] = int'(ve); hvo[m] = int'(vo);
        #1;
        chk("H", h, at(hve, m) + at(hve, m-3) + mul(cr2, at(hve, m-1) + at(hve, m-2))
                    + mul(cr1, at(hvo, m) + at(hvo, m-2)) + mul(cr3, at(hvo, m-1)));
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
