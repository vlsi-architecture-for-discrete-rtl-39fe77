// bspline97_tb: end-to-end check of the (9,7) B-spline factorized
// architecture in five configurations: retimed Type-I and Type-II, retimed
// Type-I with the pipelining register stage, and Type-I and Type-II as first
// drawn (not retimed).
//
// A random 9-bit sample stream with random gaps is fed to all three. The
// expected subbands are computed here from the serial input by direct
// convolution with the binomial taps, u = (1+z^-1)^4 x, v = (1-z^-1)^4 x,
// followed by the distributed filters with coefficients rounded from their
// decimal values:
//   L[m] = u[2m] + u[2m-4] + t2*u[2m-2] + t1*(u[2m-1] + u[2m-3])
//   H[m] = v[2m-2] + v[2m-4] + t3*v[2m-3]      (not retimed)
//   H[m] = v[2m] + v[2m-2] + t3*v[2m-1]        (retimed: one output earlier)
// (each product floor(c*a/128)). The pipelined instance must give the
// retimed values one output later. The testbench also checks the rate and latency:
// one output per input pair, out_valid exactly two cycles after the input
// cycle of the sample that completes the pair.
module bspline97_tb;
  import dwt_pkg::*;

  localparam int N = 600;       // input samples (even)

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t in_x = '0;
  logic  va, vb, vc, vd, ve;
  word_t la, ha, lb, hb, lc, hc, ld, hd, le, he;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  bspline97 #(.TYPE(POLY_TYPE1), .RETIME(1'b1), .PIPE(1'b0)) dut_a (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(va), .out_l(la), .out_h(ha));
  bspline97 #(.TYPE(POLY_TYPE2), .RETIME(1'b1), .PIPE(1'b0)) dut_b (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(vb), .out_l(lb), .out_h(hb));
  bspline97 #(.TYPE(POLY_TYPE1), .RETIME(1'b1), .PIPE(1'b1)) dut_c (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(vc), .out_l(lc), .out_h(hc));
  bspline97 #(.TYPE(POLY_TYPE1), .RETIME(1'b0), .PIPE(1'b0)) dut_d (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(vd), .out_l(ld), .out_h(hd));
  bspline97 #(.TYPE(POLY_TYPE2), .RETIME(1'b0), .PIPE(1'b0)) dut_e (
    .clk, .rst_n, .in_valid, .in_x, .out_valid(ve), .out_l(le), .out_h(he));

  int xs[0:N-1];
  int due_a[$], due_b[$];       // cycle at which each output is due
  int cyc = 0;
  int ma = 0, mb = 0, mc = 0, md = 0, me = 0;   // outputs seen
  int ct1, ct2, ct3;

  function automatic int x(input int n);
    return (n < 0 || n >= N) ? 0 : xs[n];
  endfunction

  function automatic int bsp(input int n, input bit hp);
    int b[5] = '{1, 4, 6, 4, 1};
    int s = 0;
    for (int k = 0; k < 5; k++) s += ((hp && k % 2) ? -b[k] : b[k]) * x(n - k);
    return s;
  endfunction

  function automatic int mul(input int c, input int a);
    longint p = longint'(c) * longint'(a);
    return int'(p >>> 7);
  endfunction

  function automatic int ref_l(input int m);
    if (m < 0) return 0;
    return bsp(2*m, 0) + bsp(2*m-4, 0) + mul(ct2, bsp(2*m-2, 0))
           + mul(ct1, bsp(2*m-1, 0) + bsp(2*m-3, 0));
  endfunction

  function automatic int ref_h(input int m);          // not retimed
    if (m < 0) return 0;
    return bsp(2*m-2, 1) + bsp(2*m-4, 1) + mul(ct3, bsp(2*m-3, 1));
  endfunction

  function automatic int ref_hr(input int m);         // retimed
    if (m < 0) return 0;
    return bsp(2*m, 1) + bsp(2*m-2, 1) + mul(ct3, bsp(2*m-1, 1));
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
      chk("A latency", cyc, (due_a.size() > 0) ? due_a.pop_front() : -1);
      chk("A L", int'(la), int'(word_t'(ref_l(ma))));
      chk("A H", int'(ha), int'(word_t'(ref_hr(ma))));
      ma++;
    end
    if (vb) begin
      chk("B latency", cyc, (due_b.size() > 0) ? due_b.pop_front() : -1);
      chk("B L", int'(lb), int'(word_t'(ref_l(mb))));
      chk("B H", int'(hb), int'(word_t'(ref_hr(mb))));
      mb++;
    end
    if (vc) begin
      chk("C L", int'(lc), int'(word_t'(ref_l(mc - 1))));
      chk("C H", int'(hc), int'(word_t'(ref_hr(mc - 1))));
      mc++;
    end
    if (vd) begin
      chk("D L", int'(ld), int'(word_t'(ref_l(md))));
      chk("D H", int'(hd), int'(word_t'(ref_h(md))));
      md++;
    end
    if (ve) begin
      chk("E L", int'(le), int'(word_t'(ref_l(me))));
      chk("E H", int'(he), int'(word_t'(ref_h(me))));
      me++;
    end
  end

  initial begin
    automatic int n = 0;
    ct1 = int'($floor(-4.630464 * 128.0 + 0.5));
    ct2 = int'($floor(9.597484 * 128.0 + 0.5));
    ct3 = int'($floor(3.369536 * 128.0 + 0.5));
    for (int i = 0; i < N; i++) xs[i] = $urandom_range(0, 510) - 255;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n < N) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        in_x = word_t'(xs[n]);
        if (n % 2 == 0) due_a.push_back(cyc + 2);
        else            due_b.push_back(cyc + 2);
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
