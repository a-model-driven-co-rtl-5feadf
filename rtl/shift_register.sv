// shift_register: the sliding window of the last N received samples.
//
// This is how the temporal dependency of the correlation is built: each
// clock on which in_valid is high, every tap takes the value of the tap
// above it and the new sample enters at the top, so tap[N-1] holds the
// newest sample and tap[0] the sample received N-1 samples earlier. tap[i]
// is therefore y(j+i) for the window that starts at sample j, which is the
// operand order of C(j) = sum c(i)*y(i+j). The direction (enter at the
// highest index, shift towards index 0) follows the document. The hold when
// in_valid is low and the synchronous clear on raz are this design's own.
module shift_register #(
  parameter int N        = corr_pkg::N_TAPS,
  parameter int SAMPLE_W = corr_pkg::SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       raz,      // synchronous clear to 0
  input  logic                       in_valid, // shift in in_sample
  input  logic signed [SAMPLE_W-1:0] in_sample,
  output logic signed [SAMPLE_W-1:0] tap [N]   // tap[0] oldest
);
  always_ff @(posedge clk) begin
    if (raz) begin
      for (int i = 0; i < N; i++) tap[i] <= '0;
    end else if (in_valid) begin
      for (int i = 0; i < N-1; i++) tap[i] <= tap[i+1];
      tap[N-1] <= in_sample;
    end
  end
endmodule
