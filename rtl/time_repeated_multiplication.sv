// time_repeated_multiplication: the multiplication half of the correlator.
//
// Each received sample is shifted into an N-deep window (shift_register)
// and the window is multiplied element by element with the reference code
// (repeated_multiplication). After the clock edge that accepts sample
// j+N-1, data_out[i] = c(i) * y(j+i) and out_valid is high for that one
// cycle. The code vector data2 is read combinationally against the current
// window, so a new code may be presented with every sample, as the model's
// per-sample code array allows; a design that keeps the code fixed simply
// holds data2. An assertion checks that every chip applied with a valid
// window lies in -1..1. The structure follows the document; the valid flag
// is this design's own.
module time_repeated_multiplication #(
  parameter int N        = corr_pkg::N_TAPS,
  parameter int SAMPLE_W = corr_pkg::SAMPLE_W,
  parameter int COEFF_W  = corr_pkg::COEFF_W,
  parameter int SUM_W    = corr_pkg::SUM_W
) (
  input  logic                       clk,
  input  logic                       raz,
  input  logic                       in_valid,
  input  logic signed [SAMPLE_W-1:0] data1,          // received sample
  input  logic signed [COEFF_W-1:0]  data2 [N],      // reference code
  output logic                       out_valid,
  output logic signed [SUM_W-1:0]    data_out [N]    // products
);
  logic signed [SAMPLE_W-1:0] window [N];

  shift_register #(.N(N), .SAMPLE_W(SAMPLE_W)) u_shift (
    .clk(clk), .raz(raz), .in_valid(in_valid), .in_sample(data1), .tap(window));

  repeated_multiplication #(.N(N), .SAMPLE_W(SAMPLE_W), .COEFF_W(COEFF_W), .SUM_W(SUM_W))
    u_rm (.in_data_m(window), .in_coeff_m(data2), .out_m(data_out));

  always_ff @(posedge clk) begin
    if (raz) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  function automatic logic code_legal(input logic signed [COEFF_W-1:0] c [N]);
    for (int i = 0; i < N; i++)
      if (c[i] < -1 || c[i] > 1) return 1'b0;
    return 1'b1;
  endfunction

  a_code_range : assert property (@(posedge clk) disable iff (raz)
    out_valid |-> code_legal(data2))
    else $error("reference code chip outside -1..1");
endmodule
