// polyphase_split_tb: checks the Type-I and Type-II polyphase splitters on a
// random sample stream with random input gaps.
//
// The expected pairs come from the list of accepted samples: Type-I pair m is
// (x[2m], x[2m-1]) with x[-1] = 0, Type-II pair m is (x[2m], x[2m+1]). The
// testbench also checks that pair_valid follows the completing sample by
// exactly one cycle and that every expected pair arrives.
module polyphase_split_tb;
  import dwt_pkg::*;

  localparam int N = 400;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  word_t in_x = '0;
  logic  pv1, pv2;
  word_t e1, o1, e2, o2;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  polyphase_split #(.TYPE(POLY_TYPE1)) dut1 (
    .clk, .rst_n, .in_valid, .in_x, .pair_valid(pv1), .pair_even(e1), .pair_odd(o1));
  polyphase_split #(.TYPE(POLY_TYPE2)) dut2 (
    .clk, .rst_n, .in_valid, .in_x, .pair_valid(pv2), .pair_even(e2), .pair_odd(o2));

  int xs[0:N-1];
  int nacc = 0;          // accepted samples
  int m1 = 0, m2 = 0;    // pairs seen
  logic exp1 = 1'b0, exp2 = 1'b0;   // a pair is due this cycle

  task automatic chk(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  // Monitor: runs just after each rising edge.
  always @(posedge clk) if (rst_n) begin
    #1;
    chk("pv1 timing", int'(pv1), int'(exp1));
    chk("pv2 timing", int'(pv2), int'(exp2));
    if (pv1) begin
      chk("T1 even", int'(e1), xs[2*m1]);
      chk("T1 odd",  int'(o1), (m1 == 0) ? 0 : xs[2*m1-1]);
      m1++;
    end
    if (pv2) begin
      chk("T2 even", int'(e2), xs[2*m2]);
      chk("T2 odd",  int'(o2), xs[2*m2+1]);
      m2++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (nacc < N) begin
      @(negedge clk);
      // the sample driven now is captured at the next edge
      in_valid = ($urandom_range(0, 3) != 0);
      exp1 = in_valid && (nacc % 2 == 0);
      exp2 = in_valid && (nacc % 2 == 1);
      if (in_valid) begin
        xs[nacc] = $urandom_range(0, 65535) - 32768;
        in_x = word_t'(xs[nacc]);
        nacc++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    exp1 = 1'b0; exp2 = 1'b0;
    repeat (3) @(negedge clk);
    chk("T1 pair count", m1, N / 2);
    chk("T2 pair count", m2, N / 2);
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
