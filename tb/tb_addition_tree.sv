// tb_addition_tree: streams random 1024-value vectors into the full-size
// tree, one per clock with random gaps, and checks each sum and its valid
// flag exactly log2(1024) = 10 clocks later. The extremes -8192 and +7168
// are also fed.
module tb_addition_tree;
  localparam int N = 1024;
  localparam int LAT = 10;
  logic clk = 0, raz, in_valid, out_valid;
  logic signed [13:0] in_data [N];
  logic signed [13:0] result;
  int checks = 0, failures = 0;
  int exp_sum [$];
  int exp_due [$];
  int cyc = 0;

  addition_tree dut (.clk(clk), .raz(raz), .in_valid(in_valid), .in_data(in_data),
                     .out_valid(out_valid), .result(result));
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check outputs after every rising edge
  always @(negedge clk) if (!raz) begin
    if (out_valid) begin
      checks++;
      if (exp_sum.size() == 0) begin
        failures++; $display("FAIL unexpected valid at %0d", cyc);
      end else begin
        int s, d;
        s = exp_sum.pop_front(); d = exp_due.pop_front();
        if (int'(result) != s || cyc != d) begin
          failures++;
          $display("FAIL cyc %0d: got %0d exp %0d due %0d", cyc, result, s, d);
        end
      end
    end else if (exp_due.size() > 0 && exp_due[0] <= cyc) begin
      failures++; checks++;
      $display("FAIL missing result due %0d", exp_due[0]);
      void'(exp_sum.pop_front()); void'(exp_due.pop_front());
    end
  end

  task automatic drive(input int mode);
    int s = 0;
    foreach (in_data[i]) begin
      case (mode)
        1: in_data[i] = -14'sd8;
        2: in_data[i] = 14'sd7;
        default: in_data[i] = 14'($urandom_range(15) - 8);
      endcase
      s += int'(in_data[i]);
    end
    in_valid = 1;
    exp_sum.push_back(s);
    exp_due.push_back(cyc + LAT);
  endtask

  initial begin
    raz = 1; in_valid = 0;
    foreach (in_data[i]) in_data[i] = '0;
    repeat (2) @(negedge clk);
    raz = 0;
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(3) == 0) in_valid = 0;
      else drive(n == 50 ? 1 : n == 51 ? 2 : 0);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_sum.size() != 0) begin failures++; $display("FAIL %0d results never came", exp_sum.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
