// pascal_bspline4_tb: checks the Pascal (1+/-z^-1)^4 stage in Type-I and
// Type-II form against a direct full-rate convolution.
//
// Random (e, o) pairs are applied with random gaps in en. The testbench
// rebuilds the serial signal x from the pairs (Type-I: x[2m] = e, x[2m-1] = o;
// Type-II: x[2m] = e, x[2m+1] = o), convolves it with the binomial taps
// 1 4 6 4 1 and 1 -4 6 -4 1, and compares ue/uo/ve/vo with the even and odd
// samples of those results in every cycle where en is high.
module pascal_bspline4_tb;
  import dwt_pkg::*;

  localparam int M = 300;

  logic  clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  word_t e = '0, o = '0;
  word_t ue1, ve1, uo1, vo1, ue2, ve2, uo2, vo2;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  pascal_bspline4 #(.TYPE(POLY_TYPE1)) dut1 (
    .clk, .rst_n, .en, .e, .o, .ue(ue1), .ve(ve1), .uo(uo1), .vo(vo1));
  pascal_bspline4 #(.TYPE(POLY_TYPE2)) dut2 (
    .clk, .rst_n, .en, .e, .o, .ue(ue2), .ve(ve2), .uo(uo2), .vo(vo2));

  // x1[n+1] holds Type-I x[n] (x[-1] at index 0); x2[n] holds Type-II x[n].
  int x1[0:2*M+1];
  int x2[0:2*M+1];
  localparam int B[5] = '{1, 4, 6, 4, 1};

  function automatic int conv1(input int n, input bit hp);   // Type-I, x index n
    int s = 0;
    for (int k = 0; k < 5; k++)
      if (n - k >= -1) s += ((hp && k % 2) ? -B[k] : B[k]) * x1[n - k + 1];
    return s;
  endfunction

  function automatic int conv2(input int n, input bit hp);   // Type-II
    int s = 0;
    for (int k = 0; k < 5; k++)
      if (n - k >= 0) s += ((hp && k % 2) ? -B[k] : B[k]) * x2[n - k];
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
    foreach (x1[i]) x1[i] = 0;
    foreach (x2[i]) x2[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (m < M) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      e  = word_t'($urandom_range(0, 4094) - 2047);
      o  = word_t'($urandom_range(0, 4094) - 2047);
      if (en) begin
        x1[2*m + 1] = int'(e);       // x[2m]
        x1[2*m]     = int'(o);       // x[2m-1]
        x2[2*m]     = int'(e);       // x[2m]
        x2[2*m + 1] = int'(o);       // x[2m+1]
        #1;
        chk("T1 ue", ue1, conv1(2*m, 0));
        chk("T1 ve", ve1, conv1(2*m, 1));
        chk("T1 uo", uo1, conv1(2*m - 1, 0));
        chk("T1 vo", vo1, conv1(2*m - 1, 1));
        chk("T2 ue", ue2, conv2(2*m, 0));
        chk("T2 ve", ve2, conv2(2*m, 1));
        chk("T2 uo", uo2, conv2(2*m + 1, 0));
        chk("T2 vo", vo2, conv2(2*m + 1, 1));
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
