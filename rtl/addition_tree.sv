// addition_tree: pipelined reduction of N values to their sum.
//
// The tree chains log2(N) add_step stages; stage s (s = 1..log2(N)) turns
// N/2^(s-1) values into N/2^s, each pair added by a registered adder, so
// for N = 1024 there are ten stages, 1024 -> 512 -> ... -> 2 -> 1, as in the
// document. A new set of N values may enter on every clock; its sum leaves
// on result exactly log2(N) clocks later. in_valid travels alongside the
// data in a log2(N)-deep flag pipeline and comes out as out_valid; the flag
// pipeline is this design's own addition, the document only streams data.
module addition_tree #(
  parameter int N     = corr_pkg::N_TAPS,   // power of two, >= 4
  parameter int SUM_W = corr_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    raz,       // synchronous clear
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] in_data [N],
  output logic                    out_valid,
  output logic signed [SUM_W-1:0] result     // sum of the N inputs
);
  localparam int STAGES = $clog2(N);

  for (genvar s = 0; s < STAGES; s++) begin : g_st
    localparam int NI = N >> s;
    logic signed [SUM_W-1:0] q [NI/2];
    if (s == 0) begin : g_first
      add_step #(.N_IN(NI), .SUM_W(SUM_W)) u_step (
        .clk(clk), .raz(raz), .in_a(in_data), .out_a(q));
    end else begin : g_next
      add_step #(.N_IN(NI), .SUM_W(SUM_W)) u_step (
        .clk(clk), .raz(raz), .in_a(g_st[s-1].q), .out_a(q));
    end
  end

  assign result = g_st[STAGES-1].q[0];

  logic [STAGES-1:0] vld;
  always_ff @(posedge clk) begin
    if (raz) vld <= '0;
    else     vld <= {vld[STAGES-2:0], in_valid};
  end
  assign out_valid = vld[STAGES-1];
endmodule
