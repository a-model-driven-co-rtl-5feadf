// add_step: one pipeline stage of the addition tree, N_IN values to N_IN/2.
//
// The stage repeats the elementary adder N_IN/2 times. Repetition k adds
// input elements 2k and 2k+1: the first operand is read with origin 0 and
// step 2, the second with origin 1 and step 2, and the result is written to
// output element k. The pairing, the register per adder and the stage sizes
// (1024 -> 512 for the first stage, 8 -> 4 for the eighth) follow the
// document; the outputs are valid one clock after the inputs.
module add_step #(
  parameter int N_IN  = corr_pkg::N_TAPS,   // even
  parameter int SUM_W = corr_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    raz,
  input  logic signed [SUM_W-1:0] in_a  [N_IN],
  output logic signed [SUM_W-1:0] out_a [N_IN/2]
);
  for (genvar k = 0; k < N_IN/2; k++) begin : g_add
    addition #(.SUM_W(SUM_W)) u_add (
      .clk      (clk),
      .raz      (raz),
      .in_data1 (in_a[2*k]),
      .in_data2 (in_a[2*k+1]),
      .out_data (out_a[k])
    );
  end
endmodule
