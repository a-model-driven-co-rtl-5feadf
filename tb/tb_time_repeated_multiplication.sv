// tb_time_repeated_multiplication: streams random samples (with gaps) and a
// random code that changes now and then; in each cycle after a sample was
// accepted, out_valid must be high and product i must be c(i) times window
// element i of a model window (element N-1 newest).
module tb_time_repeated_multiplication;
  localparam int N = 1024;
  logic clk = 0, raz, in_valid, out_valid;
  logic signed [3:0]  data1;
  logic signed [1:0]  data2 [N];
  logic signed [13:0] data_out [N];
  int model [N];
  logic accepted;
  int checks = 0, failures = 0;

  time_repeated_multiplication dut (.clk(clk), .raz(raz), .in_valid(in_valid), .data1(data1),
    .data2(data2), .out_valid(out_valid), .data_out(data_out));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raz = 1; in_valid = 0; data1 = '0; accepted = 0;
    foreach (data2[i]) data2[i] = 2'($urandom_range(2) - 1);
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    raz = 0;
    for (int n = 0; n < 1200; n++) begin
      // code for the window accepted at the last edge
      if ($urandom_range(30) == 0)
        foreach (data2[i]) data2[i] = 2'($urandom_range(2) - 1);
      #1;
      checks++;
      if (out_valid != accepted) begin failures++; $display("FAIL valid at %0d", n); end
      if (accepted) begin
        int bad;
        bad = 0;
        for (int i = 0; i < N; i++) if (int'(data_out[i]) != model[i] * int'(data2[i])) bad++;
        checks++;
        if (bad) begin failures++; if (failures < 5) $display("FAIL %0d products wrong at %0d", bad, n); end
      end
      in_valid = ($urandom_range(3) != 0);
      data1    = 4'($urandom_range(15));
      accepted = in_valid;
      if (in_valid) begin
        for (int i = 0; i < N-1; i++) model[i] = model[i+1];
        model[N-1] = int'(data1);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
