// tb_add_step: checks the first tree stage at full size (1024 -> 512).
// Output k must equal input 2k + input 2k+1 one clock after the inputs.
module tb_add_step;
  localparam int N_IN = 1024;
  logic clk = 0, raz;
  logic signed [13:0] in_a [N_IN];
  logic signed [13:0] out_a [N_IN/2];
  int exp_o [N_IN/2];
  int checks = 0, failures = 0;

  add_step dut (.clk(clk), .raz(raz), .in_a(in_a), .out_a(out_a));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raz = 1;
    foreach (in_a[i]) in_a[i] = '0;
    @(negedge clk);
    raz = 0;
    for (int n = 0; n < 20; n++) begin
      foreach (in_a[i]) in_a[i] = 14'($urandom_range(8191) - 4096);
      for (int k = 0; k < N_IN/2; k++) exp_o[k] = int'(in_a[2*k]) + int'(in_a[2*k+1]);
      @(negedge clk);
      for (int k = 0; k < N_IN/2; k++) begin
        checks++;
        if (int'(out_a[k]) != exp_o[k]) begin
          failures++;
          if (failures < 10) $display("FAIL round %0d k=%0d got %0d exp %0d", n, k, out_a[k], exp_o[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
