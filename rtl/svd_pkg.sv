// svd_pkg: constants and types shared by the Jacobi SVD unit.
//
// The matrix size (8 x 8) and the element width (16-bit) are the
// configuration the design is specified for. Everything else here is this
// design's own choice:
//   * matrix elements are signed two's-complement integers;
//   * rotation coefficients (cos, sin) are signed Q1.14 in 16 bits;
//   * angles are signed radians scaled by 2^16 (ANGLE_W bits);
//   * the CORDIC arctangent table holds round(atan(2^-i) * 2^16);
//   * CORDIC_K14 = round(prod_i 1/sqrt(1 + 2^-2i) * 2^14) for 16 iterations.
package svd_pkg;

  localparam int N          = 8;   // matrix dimension
  localparam int DATA_WIDTH = 16;  // element width
  localparam int COEF_FRAC  = 14;  // fractional bits of cos / sin
  localparam int ANGLE_W    = 20;  // angle word, radians * 2^16
  localparam int ATAN_N     = 18;  // entries in the arctangent table

  // round(atan(2^-i) * 65536), i = 0 .. 17
  localparam logic signed [ANGLE_W-1:0] ATAN_TABLE [ATAN_N] = '{
    20'sd51472, 20'sd30386, 20'sd16055, 20'sd8150, 20'sd4091, 20'sd2047,
    20'sd1024,  20'sd512,   20'sd256,   20'sd128,  20'sd64,   20'sd32,
    20'sd16,    20'sd8,     20'sd4,     20'sd2,    20'sd1,    20'sd0
  };

  // CORDIC gain compensation for 16 micro-rotations, Q1.14
  localparam int CORDIC_K14 = 9949;

  // Kind of a batch of memory requests handed to the ADSU.
  typedef enum logic {
    ACC_READ  = 1'b0,
    ACC_WRITE = 1'b1
  } acc_kind_e;

  function automatic logic signed [ANGLE_W-1:0] atan_lookup(input int i);
    return (i < ATAN_N) ? ATAN_TABLE[i] : '0;
  endfunction

endpackage
