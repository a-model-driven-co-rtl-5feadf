// multiplication: elementary product of one received sample and one
// reference-code chip.
//
// This is the leaf task that the correlation repeats 1024 times per sample.
// It is purely combinational: out_data = in_data * in_coeff, computed as a
// signed product and returned at the width of the partial sums (SUM_W), so
// the adder tree can take it without further extension. The document names
// this elementary task and its ports (inData, inCoeff, outData) and their
// value ranges; the choice of a combinational signed multiplier, rather than
// a registered one, is this design's own.
module multiplication #(
  parameter int SAMPLE_W = corr_pkg::SAMPLE_W,
  parameter int COEFF_W  = corr_pkg::COEFF_W,
  parameter int SUM_W    = corr_pkg::SUM_W
) (
  input  logic signed [SAMPLE_W-1:0] in_data,   // received sample
  input  logic signed [COEFF_W-1:0]  in_coeff,  // reference-code chip
  output logic signed [SUM_W-1:0]    out_data   // product
);
  localparam int PROD_W = SAMPLE_W + COEFF_W;

  logic signed [PROD_W-1:0] prod;

  always_comb begin
    prod     = PROD_W'(in_data) * PROD_W'(in_coeff);
    out_data = SUM_W'(prod);
  end
endmodule
