// correlation: streaming correlator of an anti-collision radar.
//
// The radar sends a pseudo-random code and looks for that code in the
// echo; a peak of C(j) = sum_{i=0}^{N-1} c(i) * y(i+j) at delay j marks an
// obstacle at the distance the delay encodes. One received sample y may
// enter on every clock (10 ns at 100 MHz) and one correlation value leaves
// on every clock, so all N = 1024 products and the 1023 additions are done
// in parallel for each sample.
//
// Datapath:
//   trm  (time_repeated_multiplication): 1024-deep sample window and 1024
//        multipliers against the reference code coeff[0..N-1];
//   trat (addition_tree): ten registered pairwise-add stages;
//   normalisation (conv_integer): registered sign extension to OUT_W bits.
//
// Timing: the sample presented with received_valid high at edge t completes
// the window whose value leaves on out_corr with out_valid high at edge
// t + 2 + log2(N) (12 clocks for N = 1024): one for the window register,
// log2(N) for the tree, one for the output register. coeff is applied to
// the window combinationally, so the code must be held (or be the code for
// this window) during the cycle after the sample enters. Until N samples
// have entered, the window is padded with the zeros left by rst.
//
// The three tasks, their order, their data ranges and the tree shape follow
// the document; the valid flags, the synchronous clear and the exact
// register placement are this design's own.
module correlation #(
  parameter int N        = corr_pkg::N_TAPS,
  parameter int SAMPLE_W = corr_pkg::SAMPLE_W,
  parameter int COEFF_W  = corr_pkg::COEFF_W,
  parameter int SUM_W    = corr_pkg::SUM_W,
  parameter int OUT_W    = corr_pkg::OUT_W
) (
  input  logic                       clk,
  input  logic                       rst,             // synchronous, active high
  input  logic                       received_valid,  // a sample is present
  input  logic signed [SAMPLE_W-1:0] received_signal, // -8..7
  input  logic signed [COEFF_W-1:0]  coeff [N],       // reference code, -1..1
  output logic                       out_valid,
  output logic signed [OUT_W-1:0]    out_corr
);
  logic                    prod_valid, sum_valid;
  logic signed [SUM_W-1:0] prod [N];
  logic signed [SUM_W-1:0] sum_result;

  time_repeated_multiplication #(
    .N(N), .SAMPLE_W(SAMPLE_W), .COEFF_W(COEFF_W), .SUM_W(SUM_W)
  ) trm (
    .clk(clk), .raz(rst), .in_valid(received_valid), .data1(received_signal),
    .data2(coeff), .out_valid(prod_valid), .data_out(prod));

  addition_tree #(.N(N), .SUM_W(SUM_W)) trat (
    .clk(clk), .raz(rst), .in_valid(prod_valid), .in_data(prod),
    .out_valid(sum_valid), .result(sum_result));

  conv_integer #(.SUM_W(SUM_W), .OUT_W(OUT_W)) normalisation (
    .clk(clk), .raz(rst), .in_valid(sum_valid), .in_conv(sum_result),
    .out_valid(out_valid), .out_conv(out_corr));
endmodule
