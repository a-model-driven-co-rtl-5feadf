// tb_multiplication: exhaustive check of the elementary multiplier.
// Every sample value -8..7 is combined with every 2-bit code value -2..1 and
// the product is compared with the integer product computed here.
module tb_multiplication;
  logic signed [3:0]  in_data;
  logic signed [1:0]  in_coeff;
  logic signed [13:0] out_data;
  int checks = 0, failures = 0;

  multiplication dut (.in_data(in_data), .in_coeff(in_coeff), .out_data(out_data));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = -8; y <= 7; y++) begin
      for (int c = -2; c <= 1; c++) begin
        in_data  = 4'(y);
        in_coeff = 2'(c);
        #1;
        checks++;
        if (int'(out_data) != y * c) begin
          failures++;
          $display("FAIL y=%0d c=%0d got %0d", y, c, out_data);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
