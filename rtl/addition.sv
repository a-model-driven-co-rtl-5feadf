// addition: elementary registered two-input adder of the pipelined tree.
//
// out_data takes in_data1 + in_data2 on each rising clock edge, so each
// adder is one pipeline stage of the tree. raz is a synchronous,
// active-high clear ("remise a zero") that sets out_data to zero. The
// document gives the adder's clk and raz ports and its operand ranges
// (-8192..8191); the sum is kept to SUM_W bits because the algorithm's
// ranges guarantee it never overflows. Synchronous clearing is this
// design's own choice.
module addition #(
  parameter int SUM_W = corr_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    raz,       // synchronous clear
  input  logic signed [SUM_W-1:0] in_data1,
  input  logic signed [SUM_W-1:0] in_data2,
  output logic signed [SUM_W-1:0] out_data   // registered sum, 1 cycle
);
  always_ff @(posedge clk) begin
    if (raz) out_data <= '0;
    else     out_data <= in_data1 + in_data2;
  end
endmodule
