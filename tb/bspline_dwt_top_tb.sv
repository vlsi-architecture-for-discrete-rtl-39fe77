// bspline_dwt_top_tb: end-to-end test of the four B-spline factorized DWT
// architectures at their default configuration.
//
// Stimulus: a unit impulse of height 200 followed by zeros (impulse response
// of every filter), then one 512-sample image row: 8-bit pixels of a smooth
// ramp with an edge and noise, level-shifted by -128. Samples come with
// random gaps in in_valid (input stalls).
//
// Checks, for every output of every architecture:
//  * against the real-valued analysis filters built here from the decimal
//    coefficients t1..t3, s1..s3 (normalization gains left out):
//      (9,7):  L = (1+z^-1)^4 Q(z),  H = (1-z^-1)^4 R(z)
//    (both retimed, the default; without retiming the (9,7) highpass and
//    the (6,10) lowpass would carry an extra z^-2)
//      (6,10): L = (1+z^-1)^3 (1+s3 z^-1+z^-2),  H = (1-z^-1)^5 S(z)
//    within a bound for fixed-point error: per multiplier, 1 LSB of
//    truncation plus |argument|/256 of coefficient rounding;
//  * the Type-I and Type-II (9,7) outputs are identical, sample for sample;
//  * each architecture delivers one output per input pair, two cycles after
//    the sample that completes the pair.
// Mechanism counters (all must be non-zero): input stalls, Type-I pairs,
// Type-II pairs, Solution-1 outputs, Solution-2 outputs.
module bspline_dwt_top_tb;
  import dwt_pkg::*;

  localparam int NIMP = 40;           // impulse segment
  localparam int NROW = 512;          // image row
  localparam int N    = NIMP + NROW;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t in_x = '0;
  logic  v97a, v97b, v610a, v610b;
  word_t l97a, h97a, l97b, h97b, l610a, h610a, l610b, h610b;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  bspline_dwt_top dut (
    .clk, .rst_n, .in_valid, .in_x,
    .v97a, .l97a, .h97a, .v97b, .l97b, .h97b,
    .v610a, .l610a, .h610a, .v610b, .l610b, .h610b
  );

  int  xs[0:N-1];
  real hl97[0:8], hh97[0:8], hl610[0:5], hh610[0:9];
  int  due_even[$], due_odd_q[$];
  int  cyc = 0;
  int  n97a = 0, n97b = 0, n610a = 0, n610b = 0, nstall = 0;
  int  l97_seen[0:N/2], h97_seen[0:N/2];

  function automatic int x(input int n);
    return (n < 0 || n >= N) ? 0 : xs[n];
  endfunction

  function automatic real fir(input real c[], input int m);
    real s = 0.0;
    for (int k = 0; k < c.size(); k++) s += c[k] * real'(x(2*m - k));
    return s;
  endfunction

  function automatic int absi(input int a);
    return (a < 0) ? -a : a;
  endfunction

  // integer B-spline outputs used for the error bound
  function automatic int u4(input int n);
    return x(n) + 4*x(n-1) + 6*x(n-2) + 4*x(n-3) + x(n-4);
  endfunction
  function automatic int v4(input int n);
    return x(n) - 4*x(n-1) + 6*x(n-2) - 4*x(n-3) + x(n-4);
  endfunction
  function automatic int u3(input int n);
    return x(n) + 3*x(n-1) + 3*x(n-2) + x(n-3);
  endfunction
  function automatic int v3(input int n);
    return x(n) - 3*x(n-1) + 3*x(n-2) - x(n-3);
  endfunction
  function automatic int w5(input int n);
    return x(n) - 5*x(n-1) + 10*x(n-2) - 10*x(n-3) + 5*x(n-4) - x(n-5);
  endfunction

  task automatic chk_near(input string what, input int got, input real want, input real tol);
    checks++;
    if (real'(got) - want > tol || want - real'(got) > tol) begin
      failures++;
      $display("FAIL %s: got %0d want %f (tol %f)", what, got, want, tol);
    end
  endtask

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // polynomial product helper: r = a * b
  function automatic void pmul(input real a[], input real b[], ref real r[]);
    r = new[a.size() + b.size() - 1];
    foreach (r[i]) r[i] = 0.0;
    foreach (a[i]) foreach (b[j]) r[i+j] += a[i] * b[j];
  endfunction

  always @(posedge clk) begin
    int m;
    real tol;
    cyc++;
    #1;
    if (v97a) begin
      m = n97a;
      chk("97-I latency", cyc, (due_even.size() > 0) ? due_even[0] : -1);
      tol = 2.01 + (absi(u4(2*m-2)) + absi(u4(2*m-1) + u4(2*m-3))) / 256.0;
      chk_near("97-I L", int'(l97a), fir(hl97, m), tol);
      tol = 1.01 + absi(v4(2*m-1)) / 256.0;
      chk_near("97-I H", int'(h97a), fir(hh97, m), tol);
      l97_seen[m] = int'(l97a);
      h97_seen[m] = int'(h97a);
      n97a++;
    end
    if (v97b) begin
      m = n97b;
      chk("97-II latency", cyc, (due_odd_q.size() > 0) ? due_odd_q.pop_front() : -1);
      if (m < n97a) begin
        chk("97-II L = 97-I L", int'(l97b), l97_seen[m]);
        chk("97-II H = 97-I H", int'(h97b), h97_seen[m]);
      end else begin
        checks++; failures++;
        $display("FAIL 97-II output %0d ahead of 97-I", m);
      end
      n97b++;
    end
    if (v610a) begin
      m = n610a;
      chk("610-1 latency", cyc, (due_even.size() > 0) ? due_even[0] : -1);
      tol = 1.01 + absi(u3(2*m-1)) / 256.0;
      chk_near("610-1 L", int'(l610a), fir(hl610, m), tol);
      tol = 2.01 + (absi(w5(2*m-2)) + absi(w5(2*m-1) + w5(2*m-3))) / 256.0;
      chk_near("610-1 H", int'(h610a), fir(hh610, m), tol);
      n610a++;
    end
    if (v610b) begin
      m = n610b;
      chk("610-2 latency", cyc, (due_even.size() > 0) ? due_even[0] : -1);
      tol = 1.01 + absi(u3(2*m-1)) / 256.0;
      chk_near("610-2 L", int'(l610b), fir(hl610, m), tol);
      tol = 3.01 + (absi(v3(2*m-2) + v3(2*m-4)) + absi(v3(2*m-1) + v3(2*m-5))
                    + absi(v3(2*m-3))) / 256.0;
      chk_near("610-2 H", int'(h610b), fir(hh610, m), tol);
      n610b++;
    end
    if (v97a || v610a || v610b) void'(due_even.pop_front());
  end

  initial begin
    automatic int n = 0;
    automatic real t1 = -4.630464, t2 = 9.597484, t3 = 3.369536;
    automatic real s1 = -t1, s2 = t2, s3 = -t3;
    automatic real tmp[];
    // real-valued reference filters
    pmul('{1.0, 4.0, 6.0, 4.0, 1.0}, '{1.0, t1, t2, t1, 1.0}, tmp);
    foreach (tmp[i]) hl97[i] = tmp[i];
    pmul('{1.0, -4.0, 6.0, -4.0, 1.0}, '{1.0, t3, 1.0}, tmp);
    foreach (tmp[i]) hh97[i] = tmp[i];
    pmul('{1.0, 3.0, 3.0, 1.0}, '{1.0, s3, 1.0}, tmp);
    foreach (tmp[i]) hl610[i] = tmp[i];
    pmul('{1.0, -5.0, 10.0, -10.0, 5.0, -1.0}, '{1.0, s1, s2, s1, 1.0}, tmp);
    foreach (tmp[i]) hh610[i] = tmp[i];

    // stimulus: impulse, then an image row
    for (int i = 0; i < NIMP; i++) xs[i] = (i == 0) ? 200 : 0;
    for (int i = 0; i < NROW; i++) begin
      automatic int p = 40 + (i * 150) / NROW + ((i >= 200 && i < 330) ? 60 : 0)
              + $urandom_range(0, 8);
      xs[NIMP + i] = p - 128;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (!in_valid) nstall++;
      if (in_valid) begin
        in_x = word_t'(xs[n]);
        if (n % 2 == 0) due_even.push_back(cyc + 2);
        else            due_odd_q.push_back(cyc + 2);
        n++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    chk("97-I outputs", n97a, N / 2);
    chk("97-II outputs", n97b, N / 2);
    chk("610-1 outputs", n610a, N / 2);
    chk("610-2 outputs", n610b, N / 2);
    $display("mechanisms: stalls=%0d typeI_pairs=%0d typeII_pairs=%0d sol1_outputs=%0d sol2_outputs=%0d",
             nstall, n97a, n97b, n610a, n610b);
    checks++; if (nstall == 0) begin failures++; $display("FAIL no input stall"); end
    checks++; if (n97a == 0)   begin failures++; $display("FAIL no Type-I pair"); end
    checks++; if (n97b == 0)   begin failures++; $display("FAIL no Type-II pair"); end
    checks++; if (n610a == 0)  begin failures++; $display("FAIL no Solution-1 output"); end
    checks++; if (n610b == 0)  begin failures++; $display("FAIL no Solution-2 output"); end
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
