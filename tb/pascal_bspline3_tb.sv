// pascal_bspline3_tb: checks the Type-I Pascal (1+/-z^-1)^3 stage against a
// direct full-rate convolution.
//
// Random (e, o) pairs are applied with random gaps in en; the serial signal
// is x[2m] = e[m], x[2m-1] = o[m]. ue/ve must equal (1+/-z^-1)^3 x at n = 2m
// and uo/vo the same at n = 2m-1, in every cycle where en is high.
module pascal_bspline3_tb;
  import dwt_pkg::*;

  localparam int M = 300;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t e = '0, o = '0;
  word_t ue, ve, uo, vo;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  pascal_bspline3 dut (.clk, .rst_n, .en, .e, .o, .ue, .ve, .uo, .vo);

  int x[0:2*M+1];          // x[n+1] holds x[n]
  localparam int B[4] = '{1, 3, 3, 1};

  function automatic int conv(input int n, input bit hp);
    int s = 0;
    for (int k = 0; k < 4; k++)
      if (n - k >= -1) s += ((hp && k % 2) ? -B[k] : B[k]) * x[n - k + 1];
    return s;
  endfunction

  task automatic chk(input string what, input word_t got, input int want);
    checks++;
    if (got != word_t'(want)) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    automatic int m = 0;
    foreach (x[i]) x[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      e  = word_t'($urandom_range(0, 4094) - 2047);
      o  = word_t'($urandom_range(0, 4094) - 2047);
      if (en) begin
        x[2*m + 1] = int'(e);
        x[2*m]     = int'(o);
        #1;
        chk("ue", ue, conv(2*m, 0));
        chk("ve", ve, conv(2*m, 1));
        chk("uo", uo, conv(2*m - 1, 0));
        chk("vo", vo, conv(2*m - 1, 1));
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
