// tb_correlation: end-to-end test of the full-size correlator (N = 1024,
// default parameters).
//
// A reference model here keeps the last N accepted samples and, for each
// accepted sample, computes sum_i c(i) * y(i+j) with the code that is on the
// coeff port in the cycle after the sample is taken. Every result must
// appear with out_valid exactly 12 clocks after the edge that took its
// sample (one window register, ten tree stages, one output register).
//
// Phases, each counted as a mechanism that must occur at least once:
//   1. random samples with random input gaps (stream pauses) and a random
//      ternary code that is replaced mid-stream (code change; chips -1, 0
//      and +1 all used);
//   2. range ends: a window of -8 against an all +1 code gives -8192, a
//      window of 7 gives +7168;
//   3. detection: an echo of a +-1 code, scaled by 3, with noise, placed
//      after DELAY noise samples; the largest output must be the one whose
//      window starts exactly at the echo (a correlation peak).
module tb_correlation;
  localparam int N     = 1024;
  localparam int LAT   = 12;
  localparam int DELAY = 700;

  logic clk = 0, rst, received_valid, out_valid;
  logic signed [3:0]  received_signal;
  logic signed [1:0]  coeff [N];
  logic signed [31:0] out_corr;

  correlation dut (.clk(clk), .rst(rst), .received_valid(received_valid),
    .received_signal(received_signal), .coeff(coeff), .out_valid(out_valid), .out_corr(out_corr));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int win [N];
  int exp_val [$], exp_due [$], exp_idx [$];
  logic pending;         // a sample was taken at the last edge
  int   pending_idx;     // its index in the accepted stream
  int   n_accepted = 0;

  // mechanism counters
  int n_gaps = 0, n_code_change = 0, n_chip_neg = 0, n_chip_zero = 0, n_chip_pos = 0;
  int n_full_window = 0, n_min_range = 0, n_max_range = 0, n_peak = 0;

  // peak tracking for phase 3
  logic track_peak = 0;
  int   peak_val = -100000, peak_idx = -1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: runs at each falling edge, after the rising edge settled
  always @(negedge clk) if (!rst) begin
    if (out_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++; $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        int v, d, k;
        v = exp_val.pop_front(); d = exp_due.pop_front(); k = exp_idx.pop_front();
        if (int'(out_corr) != v || cyc != d) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: got %0d at %0d, exp %0d at %0d", k, out_corr, cyc, v, d);
        end
        if (v == -8192) n_min_range++;
        if (v == 7168)  n_max_range++;
        if (track_peak && int'(out_corr) > peak_val) begin
          peak_val = int'(out_corr); peak_idx = k;
        end
      end
    end else if (exp_due.size() > 0 && exp_due[0] <= cyc) begin
      checks++; failures++;
      $display("FAIL missing output due %0d", exp_due[0]);
      void'(exp_val.pop_front()); void'(exp_due.pop_front()); void'(exp_idx.pop_front());
    end
  end

  // one clock of stimulus, applied at the falling edge; new_code is applied
  // first and is the code for the window taken at the previous edge
  task automatic step(input logic v, input int s);
    if (pending) begin
      int acc = 0;
      for (int i = 0; i < N; i++) acc += win[i] * int'(coeff[i]);
      exp_val.push_back(acc);
      exp_due.push_back(cyc + LAT - 1);
      exp_idx.push_back(pending_idx);
      if (pending_idx >= N - 1) n_full_window++;
    end
    received_valid  = v;
    received_signal = 4'(s);
    pending = v;
    if (v) begin
      for (int i = 0; i < N-1; i++) win[i] = win[i+1];
      win[N-1] = s;
      pending_idx = n_accepted;
      n_accepted++;
    end else n_gaps++;
    @(negedge clk);
  endtask

  task automatic set_code(input int mode);
    foreach (coeff[i]) begin
      case (mode)
        0: coeff[i] = 2'($urandom_range(2) - 1);             // ternary
        1: coeff[i] = 2'sd1;                                  // all +1
        default: coeff[i] = $urandom_range(1) ? 2'sd1 : -2'sd1; // +-1
      endcase
      if (coeff[i] == -2'sd1) n_chip_neg++;
      else if (coeff[i] == 2'sd0) n_chip_zero++;
      else n_chip_pos++;
    end
  endtask

  int code_copy [N];
  int mech_counts [9];
  int noise;

  initial begin
    rst = 1; received_valid = 0; received_signal = '0; pending = 0;
    foreach (win[i]) win[i] = 0;
    set_code(0);
    repeat (3) @(negedge clk);
    rst = 0;

    // phase 1: random stream, gaps, code change
    for (int n = 0; n < 1500; n++) begin
      if (n == 700) begin set_code(0); n_code_change++; end
      step($urandom_range(4) != 0, int'($urandom_range(15)) - 8);
    end

    // phase 2: range ends
    set_code(1); n_code_change++;
    for (int n = 0; n < N; n++) step(1, -8);
    for (int n = 0; n < N; n++) step(1, 7);

    // phase 3: detection of a delayed, noisy echo of a +-1 code
    step(0, 0);
    set_code(2); n_code_change++;
    foreach (coeff[i]) code_copy[i] = int'(coeff[i]);
    wait (exp_val.size() == 0 && !pending);
    @(negedge clk);
    track_peak = 1;
    for (int n = 0; n < DELAY + N + 300; n++) begin
      int s;
      noise = int'($urandom_range(4)) - 2;
      if (n >= DELAY && n < DELAY + N) s = 3 * code_copy[n - DELAY] + noise;
      else s = int'($urandom_range(6)) - 3;
      step(1, s);
    end
    step(0, 0);
    repeat (LAT + 2) @(negedge clk);
    track_peak = 0;

    // the peak must sit on the output whose window starts at the echo
    checks++;
    begin
      int want = 0, base = 0;
      base = n_accepted - (DELAY + N + 300);
      want = base + DELAY + N - 1;
      if (peak_idx != want || peak_val < 2 * N) begin
        failures++;
        $display("FAIL peak at sample %0d value %0d, expected sample %0d", peak_idx, peak_val, want);
      end else n_peak++;
    end

    checks++;
    if (exp_val.size() != 0) begin failures++; $display("FAIL %0d outputs never came", exp_val.size()); end

    mech_counts = '{n_gaps, n_code_change, n_chip_neg, n_chip_zero, n_chip_pos, n_full_window, n_min_range, n_max_range, n_peak};
    foreach (mech_counts[i]) begin
      checks++;
      if (mech_counts[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("mechanisms: gaps=%0d code_changes=%0d chips(-1/0/+1)=%0d/%0d/%0d full_windows=%0d min_range=%0d max_range=%0d peaks=%0d",
             n_gaps, n_code_change, n_chip_neg, n_chip_zero, n_chip_pos, n_full_window, n_min_range, n_max_range, n_peak);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
