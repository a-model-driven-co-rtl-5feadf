// tb_radar_echo: radar scenario on the full-size correlator.
//
// The radar emits a random +-1 code of 1024 chips over and over. Two
// obstacles reflect it: one at a delay of D1 samples with amplitude 3 and a
// weaker one at D2 with amplitude 2; noise of -1..1 is added. The received
// sample is therefore 3*c((t-D1) mod N) + 2*c((t-D2) mod N) + noise, which
// stays within -8..7. For a window starting at sample j, C(j) is about 3*N
// when j = D1 (mod N), about 2*N when j = D2 (mod N), and small elsewhere.
// For each of three full code periods the testbench finds the two largest
// outputs and checks that they sit at D1 and D2, that the D1 peak is the
// larger, and that each peak is within noise of its ideal height.
module tb_radar_echo;
  localparam int N = 1024;
  localparam int D1 = 137, D2 = 803;
  localparam int PERIODS = 4;

  logic clk = 0, rst, received_valid, out_valid;
  logic signed [3:0]  received_signal;
  logic signed [1:0]  coeff [N];
  logic signed [31:0] out_corr;

  correlation dut (.clk(clk), .rst(rst), .received_valid(received_valid),
    .received_signal(received_signal), .coeff(coeff), .out_valid(out_valid), .out_corr(out_corr));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int code [N];
  int result [PERIODS*N];
  int n_out = 0;

  initial begin : watchdog
    repeat (PERIODS*N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && out_valid) begin
    if (n_out < PERIODS*N) result[n_out] = int'(out_corr);
    n_out++;
  end

  initial begin
    rst = 1; received_valid = 0; received_signal = '0;
    foreach (code[i]) begin
      code[i]  = $urandom_range(1) ? 1 : -1;
      coeff[i] = 2'(code[i]);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < PERIODS*N; t++) begin
      int s;
      s = 3 * code[(t - D1 + PERIODS*N) % N] + 2 * code[(t - D2 + PERIODS*N) % N]
          + int'($urandom_range(2)) - 1;
      received_valid  = 1;
      received_signal = 4'(s);
      @(negedge clk);
    end
    received_valid = 0;
    repeat (20) @(negedge clk);

    checks++;
    if (n_out != PERIODS*N) begin failures++; $display("FAIL %0d outputs, expected %0d", n_out, PERIODS*N); end

    // output k belongs to the window that starts at sample k-N+1
    for (int p = 0; p < PERIODS-1; p++) begin
      int best, best_j, second, second_j;
      best = -100000; best_j = -1; second = -100000; second_j = -1;
      for (int j = p*N; j < (p+1)*N; j++) begin
        int v;
        v = result[j + N - 1];
        if (v > best) begin second = best; second_j = best_j; best = v; best_j = j; end
        else if (v > second) begin second = v; second_j = j; end
      end
      checks += 3;
      if (best_j % N != D1) begin failures++; $display("FAIL period %0d: main peak at %0d", p, best_j % N); end
      if (second_j % N != D2) begin failures++; $display("FAIL period %0d: second peak at %0d", p, second_j % N); end
      if (best < 3*N - 300 || best > 3*N + 300 || second < 2*N - 300 || second > 2*N + 300) begin
        failures++; $display("FAIL period %0d: peak heights %0d, %0d", p, best, second);
      end
      $display("period %0d: peaks %0d at delay %0d, %0d at delay %0d", p, best, best_j % N, second, second_j % N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
