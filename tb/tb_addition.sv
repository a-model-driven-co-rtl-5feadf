// tb_addition: random check of the registered adder and its clear.
// The sum must appear one clock after the operands; raz must zero it.
module tb_addition;
  logic clk = 0, raz;
  logic signed [13:0] a, b, q;
  int checks = 0, failures = 0;
  int exp_q;

  addition dut (.clk(clk), .raz(raz), .in_data1(a), .in_data2(b), .out_data(q));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raz = 1; a = 14'(100); b = 14'(23);
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL clear: %0d", q); end
    raz = 0;
    for (int n = 0; n < 500; n++) begin
      int x, y;
      x = $urandom_range(8191) - 4096;
      y = $urandom_range(8191) - 4096;
      a = 14'(x); b = 14'(y);
      exp_q = x + y;
      @(negedge clk);
      checks++;
      if (int'(q) != exp_q) begin
        failures++;
        $display("FAIL %0d + %0d got %0d", x, y, q);
      end
    end
    raz = 1;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL clear late: %0d", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
