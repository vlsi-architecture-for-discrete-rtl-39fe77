// bspline610_tb: end-to-end check of the (6,10) B-spline factorized
// architecture in five configurations: retimed Solution-1, retimed
// Solution-1 with the pipelining cut, retimed Solution-2, and Solution-1 and
// Solution-2 as drawn (not retimed).
//
// A random 9-bit sample stream with random gaps is fed to all three. The
// expected subbands are computed here from the serial input by direct
// convolution, u = (1+z^-1)^3 x, v = (1-z^-1)^3 x, w = (1-z^-1)^5 x, and the
// distributed filters with coefficients rounded from their decimal values
// (each product floor(c*a/128)):
//   L[m]      = u[2m] + u[2m-2] + s3*u[2m-1]            (retimed)
//   H_sol1[m] = w[2m] + w[2m-4] + s2*w[2m-2] + s1*(w[2m-1] + w[2m-3])
//   H_sol2[m] = v[2m] + v[2m-6] + r2*(v[2m-2] + v[2m-4])
//               + r1*(v[2m-1] + v[2m-5]) + r3*v[2m-3]
// The forms as drawn must give the lowpass one output later; the pipelined
// instance must give the highpass one output later.
// Rate and latency: one output per input pair, out_valid two cycles after the
// input cycle of each even-indexed sample.
module bspline610_tb;
  import dwt_pkg::*;

  localparam int N = 600;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t in_x = '0;
  logic  va, vb, vc, vd, ve;
  word_t la, ha, lb, hb, lc, hc, ld, hd, le, he;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  bspline610 #(.SOLUTION(1), .RETIME(1'b1), .PIPE(1'b0)) dut_a (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(va), .out_l(la), .out_h(ha));
  bspline610 #(.SOLUTION(1), .RETIME(1'b1), .PIPE(1'b1)) dut_b (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(vb), .out_l(lb), .out_h(hb));
  bspline610 #(.SOLUTION(2), .RETIME(1'b1), .PIPE(1'b0)) dut_c (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(vc), .out_l(lc), .out_h(hc));
  bspline610 #(.SOLUTION(1), .RETIME(1'b0), .PIPE(1'b0)) dut_d (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(vd), .out_l(ld), .out_h(hd));
  bspline610 #(.SOLUTION(2), .RETIME(1'b0), .PIPE(1'b0)) dut_e (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(ve), .out_l(le), .out_h(he));

  int xs[0:N-1];
  int due[$];
  int cyc = 0;
  int ma = 0, mb = 0, mc = 0, md = 0, me = 0;
  int cs1, cs2, cs3, cr1, cr2, cr3;

  function automatic int x(input int n);
    return (n < 0 || n >= N) ? 0 : xs[n];
  endfunction

  // (1+z^-1)^3, (1-z^-1)^3 and (1-z^-1)^5 of x at sample n
  function automatic int u3(input int n);
    return x(n) + 3*x(n-1) + 3*x(n-2) + x(n-3);
  endfunction
  function automatic int v3(input int n);
    return x(n) - 3*x(n-1) + 3*x(n-2) - x(n-3);
  endfunction
  function automatic int w5(input int n);
    return x(n) - 5*x(n-1) + 10*x(n-2) - 10*x(n-3) + 5*x(n-4) - x(n-5);
  endfunction

  function automatic int mul(input int c, input int a);
    longint p = longint'(c) * longint'(a);
    return int'(p >>> 7);
  endfunction

  function automatic int ref_l(input int m);
    if (m < 0) return 0;
    return u3(2*m) + u3(2*m-2) + mul(cs3, u3(2*m-1));
  endfunction
  function automatic int ref_h1(input int m);
    if (m < 0) return 0;
    return w5(2*m) + w5(2*m-4) + mul(cs2, w5(2*m-2)) + mul(cs1, w5(2*m-1) + w5(2*m-3));
  endfunction
  function automatic int ref_h2(input int m);
    if (m < 0) return 0;
    return v3(2*m) + v3(2*m-6) + mul(cr2, v3(2*m-2) + v3(2*m-4))
           + mul(cr1, v3(2*m-1) + v3(2*m-5)) + mul(cr3, v3(2*m-3));
  endfunction

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    #1;
    if (va) begin
      chk("A latency", cyc, (due.size() > 0) ? due.pop_front() : -1);
      chk("A L", int'(la), int'(word_t'(ref_l(ma))));
      chk("A H", int'(ha), int'(word_t'(ref_h1(ma))));
      ma++;
    end
    if (vb) begin
      chk("B L", int'(lb), int'(word_t'(ref_l(mb))));
      chk("B H", int'(hb), int'(word_t'(ref_h1(mb - 1))));
      mb++;
    end
    if (vc) begin
      chk("C L", int'(lc), int'(word_t'(ref_l(mc))));
      chk("C H", int'(hc), int'(word_t'(ref_h2(mc))));
      mc++;
    end
    if (vd) begin
      chk("D L", int'(ld), int'(word_t'(ref_l(md - 1))));
      chk("D H", int'(hd), int'(word_t'(ref_h1(md))));
      md++;
    end
    if (ve) begin
      chk("E L", int'(le), int'(word_t'(ref_l(me - 1))));
      chk("E H", int'(he), int'(word_t'(ref_h2(me))));
      me++;
    end
  end

  initial begin
    automatic int n = 0;
    cs1 = int'($floor(4.630464 * 128.0 + 0.5));
    cs2 = int'($floor(9.597484 * 128.0 + 0.5));
    cs3 = int'($floor(-3.369536 * 128.0 + 0.5));
    cr1 = int'($floor(2.630464 * 128.0 + 0.5));
    cr2 = int'($floor(1.336557 * 128.0 + 0.5));
    cr3 = int'($floor(-9.934042 * 128.0 + 0.5));
    for (int i = 0; i < N; i++) xs[i] = $urandom_range(0, 510) - 255;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        in_x = word_t'(xs[n]);
        if (n % 2 == 0) due.push_back(cyc + 2);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    chk("A output count", ma, N / 2);
    chk("B output count", mb, N / 2);
    chk("C output count", mc, N / 2);
    chk("D output count", md, N / 2);
    chk("E output count", me, N / 2);
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
