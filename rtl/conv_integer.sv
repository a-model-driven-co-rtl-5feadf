// conv_integer: output stage that turns the tree's range-limited sum into a
// plain integer.
//
// On each clock, in_conv (SUM_W bits, -8192..8191) is sign-extended to
// OUT_W bits and registered on out_conv, and in_valid is registered on
// out_valid, so the stage adds one clock of latency. The document says only
// that this task standardises the result into integer values; the register
// and the 32-bit width are this design's own choices.
module conv_integer #(
  parameter int SUM_W = corr_pkg::SUM_W,
  parameter int OUT_W = corr_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    raz,
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] in_conv,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_conv
);
  always_ff @(posedge clk) begin
    if (raz) begin
      out_valid <= 1'b0;
      out_conv  <= '0;
    end else begin
      out_valid <= in_valid;
      out_conv  <= OUT_W'(in_conv);
    end
  end
endmodule
