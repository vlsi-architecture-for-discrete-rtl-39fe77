// dwt_pkg: word widths, coefficient encoding and the fixed-point multiply
// shared by every block of the B-spline factorized DWT.
//
// All internal words are DW = 16-bit two's complement and every multiplier is
// a 16-by-12 multiplication, as in the reference synthesis setup of the
// architecture. The non-integer coefficients of the distributed parts reach
// |9.93|, so they are coded as 12-bit signed numbers with 7 fraction bits
// (Q5.7, scale 128); this split of the 12 bits is a design choice. A product
// is shifted right arithmetically by 7 (truncation towards minus infinity)
// and kept to 16 bits. Adders wrap modulo 2^16.
package dwt_pkg;

  localparam int DW = 16;             // data word
  localparam int CW = 12;             // coefficient word
  localparam int CF = 7;              // coefficient fraction bits

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [CW-1:0] coef_t;

  // Polyphase decomposition type (Type-I: z^-1 then decimate,
  // Type-II: z then decimate).
  typedef enum logic {POLY_TYPE1 = 1'b0, POLY_TYPE2 = 1'b1} poly_type_e;

  // (9,7) distributed-part coefficients, round(value * 128):
  //   t1 = -4.630464, t2 = 9.597484, t3 = 3.369536
  localparam coef_t T1 = -12'sd593;
  localparam coef_t T2 =  12'sd1228;
  localparam coef_t T3 =  12'sd431;

  // (6,10) coefficients: s1 = -t1, s2 = t2, s3 = -t3,
  //   r1 = 2.630464, r2 = 1.336557, r3 = -9.934042
  localparam coef_t S1 =  12'sd593;
  localparam coef_t S2 =  12'sd1228;
  localparam coef_t S3 = -12'sd431;
  localparam coef_t R1 =  12'sd337;
  localparam coef_t R2 =  12'sd171;
  localparam coef_t R3 = -12'sd1272;

  // 16-by-12 multiply, rescaled by 2^-CF and truncated to one data word.
  function automatic word_t cmul(input word_t a, input coef_t c);
    logic signed [DW+CW-1:0] p;
    p = a * c;
    return word_t'(p >>> CF);
  endfunction

endpackage
