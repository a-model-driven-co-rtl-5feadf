// tb_repeated_multiplication: random full-size windows and codes; every
// one of the 1024 products is compared with the integer product.
module tb_repeated_multiplication;
  localparam int N = 1024;
  logic signed [3:0]  d [N];
  logic signed [1:0]  c [N];
  logic signed [13:0] p [N];
  int checks = 0, failures = 0;

  repeated_multiplication dut (.in_data_m(d), .in_coeff_m(c), .out_m(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      foreach (d[i]) begin
        d[i] = 4'($urandom_range(15));
        c[i] = 2'($urandom_range(2) - 1);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(p[i]) != int'(d[i]) * int'(c[i])) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d %0d*%0d got %0d", i, d[i], c[i], p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
