// tb_shift_register: pushes 1300 random samples, with random gaps, into
// the full 1024-deep window and compares every tap with a model window
// after each clock. tap[N-1] must be the newest sample, tap[0] the oldest.
module tb_shift_register;
  localparam int N = 1024;
  logic clk = 0, raz, in_valid;
  logic signed [3:0] in_sample;
  logic signed [3:0] tap [N];
  int model [N];
  int checks = 0, failures = 0;

  shift_register dut (.clk(clk), .raz(raz), .in_valid(in_valid), .in_sample(in_sample), .tap(tap));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    int bad = 0;
    for (int i = 0; i < N; i++) if (int'(tap[i]) != model[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; if (failures < 5) $display("FAIL %0d taps differ", bad); end
  endtask

  initial begin
    raz = 1; in_valid = 1; in_sample = 4'sd5;
    foreach (model[i]) model[i] = 0;
    @(negedge clk);
    compare();
    raz = 0;
    for (int n = 0; n < 1300; n++) begin
      in_valid  = ($urandom_range(4) != 0);
      in_sample = 4'($urandom_range(15));
      if (in_valid) begin
        for (int i = 0; i < N-1; i++) model[i] = model[i+1];
        model[N-1] = int'(in_sample);
      end
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
