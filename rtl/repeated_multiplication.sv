// repeated_multiplication: N parallel products of a sample window and the
// reference code.
//
// Repetition i multiplies window element i by code chip i (one elementary
// multiplication each); out_m[i] = in_data_m[i] * in_coeff_m[i]. The
// element-for-element pairing and the count of 1024 repetitions follow the
// document. The block is combinational.
module repeated_multiplication #(
  parameter int N        = corr_pkg::N_TAPS,
  parameter int SAMPLE_W = corr_pkg::SAMPLE_W,
  parameter int COEFF_W  = corr_pkg::COEFF_W,
  parameter int SUM_W    = corr_pkg::SUM_W
) (
  input  logic signed [SAMPLE_W-1:0] in_data_m  [N],
  input  logic signed [COEFF_W-1:0]  in_coeff_m [N],
  output logic signed [SUM_W-1:0]    out_m      [N]
);
  for (genvar i = 0; i < N; i++) begin : g_mul
    multiplication #(.SAMPLE_W(SAMPLE_W), .COEFF_W(COEFF_W), .SUM_W(SUM_W))
      u_mul (.in_data(in_data_m[i]), .in_coeff(in_coeff_m[i]), .out_data(out_m[i]));
  end
endmodule
