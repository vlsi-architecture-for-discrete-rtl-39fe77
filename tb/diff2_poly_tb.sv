// diff2_poly_tb: checks the polyphase (1-z^-1)^2 stage of Solution-1 against
// a full-rate second difference.
//
// The polyphase inputs are interleaved into one signal, v[2m] = ve[m],
// v[2m-1] = vo[m]; w[n] = v[n] - 2v[n-1] + v[n-2] is formed directly and its
// samples w[2m] and w[2m-1] are compared with we and wo whenever en is high.
module diff2_poly_tb;
  import dwt_pkg::*;

  localparam int M = 400;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t ve = '0, vo = '0;
  word_t we, wo;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  diff2_poly dut (.clk, .rst_n, .en, .ve, .vo, .we, .wo);

  int v[0:2*M+1];        // v[n+1] holds v[n]

  function automatic int w(input int n);
    int s = 0;
    if (n >= -1) s += v[n + 1];
    if (n >= 0)  s -= 2 * v[n];
    if (n >= 1)  s += v[n - 1];
    return s;
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
    foreach (v[i]) v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      ve = word_t'($urandom_range(0, 16000) - 8000);
      vo = word_t'($urandom_range(0, 16000) - 8000);
      if (en) begin
        v[2*m + 1] = int'(ve);
        v[2*m]     = int'(vo);
        #1;
        chk("we", we, w(2*m));
        chk("wo", wo, w(2*m - 1));
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
