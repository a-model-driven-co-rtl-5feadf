// corr_pkg: widths and sizes shared by the radar correlation accelerator.
//
// The accelerator computes C(j) = sum_{i=0}^{N_TAPS-1} c(i) * y(i+j) on a
// stream of received samples y, one sample per clock. The value ranges
// follow the model of the algorithm: received samples lie in -8..7 (4-bit
// two's complement), reference-code chips in -1..1 (2-bit two's complement)
// and every product and partial sum in -8192..8191 (14 bits). 14 bits are
// exactly enough: the sum of 1024 products of |y| <= 8 and |c| <= 1 lies in
// -8192..7168. The 32-bit output width is this design's own choice for a
// plain integer result.
package corr_pkg;
  localparam int N_TAPS    = 1024; // correlation length, power of two
  localparam int SAMPLE_W  = 4;    // received sample, -8..7
  localparam int COEFF_W   = 2;    // reference code chip, -1..1
  localparam int SUM_W     = 14;   // products and partial sums, -8192..8191
  localparam int OUT_W     = 32;   // integer result

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEFF_W-1:0]  coeff_t;
  typedef logic signed [SUM_W-1:0]    sum_t;
  typedef logic signed [OUT_W-1:0]    out_t;
endpackage
