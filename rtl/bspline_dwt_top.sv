// bspline_dwt_top: the four B-spline factorized DWT architectures side by
// side on one input stream.
//
//   u_97_t1   (9,7) filter, Type-I polyphase form        -> l97a / h97a
//   u_97_t2   (9,7) filter, Type-II polyphase form       -> l97b / h97b
//   u_610_s1  (6,10) filter, Solution-1, Type-I          -> l610a / h610a
//   u_610_s2  (6,10) filter, Solution-2, Type-I          -> l610b / h610b
//
// Each is a complete one-level analysis filter bank that turns the sample
// stream into a lowpass and a highpass subband at half the input rate; they
// are alternatives, and sharing the input only lets them run together. The
// normalization gains h0/g0 are not applied, so every output is the
// subband sample divided by its normalization gain (see the blocks).
//
// Interface: in_valid/in_x, one 16-bit sample per cycle at most, no
// back-pressure. Each architecture has its own valid: the Type-I ones pulse
// two cycles after every even-indexed sample, the Type-II one two cycles
// after every odd-indexed sample. RETIME97 and RETIME610 select the retimed
// datapaths (default on; the (9,7) highpass and the (6,10) lowpass then come
// one output sample earlier). PIPE97 and PIPE610 select the pipelined
// variants of the (9,7) and (6,10) Solution-1 datapaths (default off).
//
// Placing the four alternatives on a shared input is this design's choice.
module bspline_dwt_top
  import dwt_pkg::*;
#(
  parameter bit RETIME97 = 1'b1,
  parameter bit PIPE97  = 1'b0,
  parameter bit RETIME610 = 1'b1,
  parameter bit PIPE610 = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_x,
  output logic  v97a,
  output word_t l97a,
  output word_t h97a,
  output logic  v97b,
  output word_t l97b,
  output word_t h97b,
  output logic  v610a,
  output word_t l610a,
  output word_t h610a,
  output logic  v610b,
  output word_t l610b,
  output word_t h610b
);

  bspline97 #(.TYPE(POLY_TYPE1), .RETIME(RETIME97), .PIPE(PIPE97)) u_97_t1 (
    .clk, .rst_n, .in_valid, .in_x,
    .out_valid(v97a), .out_l(l97a), .out_h(h97a)
  );

  bspline97 #(.TYPE(POLY_TYPE2), .RETIME(RETIME97), .PIPE(PIPE97)) u_97_t2 (
    .clk, .rst_n, .in_valid, .in_x,
    .out_valid(v97b), .out_l(l97b), .out_h(h97b)
  );

  bspline610 #(.SOLUTION(1), .RETIME(RETIME610), .PIPE(PIPE610)) u_610_s1 (
    .clk, .rst_n, .in_valid, .in_x,
    .out_valid(v610a), .out_l(l610a), .out_h(h610a)
  );

  bspline610 #(.SOLUTION(2), .RETIME(RETIME610), .PIPE(1'b0)) u_610_s2 (
    .clk, .rst_n, .in_valid, .in_x,
    .out_valid(v610b), .out_l(l610b), .out_h(h610b)
  );

endmodule
