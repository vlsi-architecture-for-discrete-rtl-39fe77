// polyphase_split: polyphase decomposition of a serial sample stream into
// (even, odd) pairs, one pair for every two accepted samples.
//
// Type-I takes the even part straight and the odd part through a z^-1 before
// the 2:1 decimators, so pair m is (x[2m], x[2m-1]); it is emitted when
// x[2m] arrives, and x[-1] is the reset value 0. Type-II puts an advance z in
// the odd branch, so pair m is (x[2m], x[2m+1]); causally it is emitted when
// x[2m+1] arrives. The z / z^-1 element is one register holding the last
// accepted sample; a phase bit plays the decimators.
//
// Interface: in_valid/in_x accept one sample per cycle when in_valid is high
// (gaps are allowed, there is no back-pressure). pair_valid pulses one cycle
// after the sample that completes a pair, with pair_even/pair_odd registered.
// The first sample after reset is x[0].
//
// The Type-I and Type-II decompositions follow the published architecture;
// the registered output, the valid signalling and the causal handling of
// Type-II are choices of this design.
module polyphase_split
  import dwt_pkg::*;
#(
  parameter poly_type_e TYPE = POLY_TYPE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_x,
  output logic  pair_valid,
  output word_t pair_even,
  output word_t pair_odd
);

  word_t prev;     // the z^-1 / z element: last accepted sample
  logic  phase;    // 0: next sample has an even index

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      phase      <= 1'b0;
      pair_valid <= 1'b0;
      pair_even  <= '0;
      pair_odd   <= '0;
    end else begin
      pair_valid <= 1'b0;
      if (in_valid) begin
        prev  <= in_x;
        phase <= ~phase;
        if (TYPE == POLY_TYPE1 && !phase) begin
          pair_valid <= 1'b1;          // x[2m] with x[2m-1]
          pair_even  <= in_x;
          pair_odd   <= prev;
        end else if (TYPE == POLY_TYPE2 && phase) begin
          pair_valid <= 1'b1;          // x[2m] with x[2m+1]
          pair_even  <= prev;
          pair_odd   <= in_x;
        end
      end
    end
  end

endmodule
