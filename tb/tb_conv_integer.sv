// tb_conv_integer: random 14-bit sums, including both range ends, must come
// out sign-extended to 32 bits one clock later, with the valid flag
// delayed by the same clock.
module tb_conv_integer;
  logic clk = 0, raz, in_valid, out_valid;
  logic signed [13:0] in_conv;
  logic signed [31:0] out_conv;
  int checks = 0, failures = 0;

  conv_integer dut (.clk(clk), .raz(raz), .in_valid(in_valid), .in_conv(in_conv),
                    .out_valid(out_valid), .out_conv(out_conv));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raz = 1; in_valid = 1; in_conv = 14'sd77;
    @(negedge clk);
    checks++;
    if (out_valid || out_conv != 0) begin failures++; $display("FAIL clear"); end
    raz = 0;
    for (int n = 0; n < 300; n++) begin
      int v; logic vv;
      v  = (n == 0) ? -8192 : (n == 1) ? 8191 : int'($urandom_range(16383)) - 8192;
      vv = ($urandom_range(1) == 1);
      in_conv = 14'(v); in_valid = vv;
      @(negedge clk);
      checks++;
      if (out_conv !== 32'(v) || out_valid !== vv) begin
        failures++;
        $display("FAIL %0d/%0b got %0d/%0b", v, vv, out_conv, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
