// tb_running_variance: self-checking test of the windowed variance.
// Feeds streaks of constant samples, single steps, full-scale swings, jitter
// around a high level and random samples, with in_valid dropped now and then.
// The testbench keeps its own list of accepted samples and, at every edge,
// works out the exact variance of the last four, floor((4*sum(x^2) -
// sum(x)^2) / 16); one edge later var_out must equal it and var_valid must be
// high exactly when four samples have been accepted since reset.
`timescale 1ns/1ps
module tb_running_variance;
  localparam int unsigned HW_W   = 8;
  localparam int unsigned LOG2_T = 2;
  localparam int unsigned T      = 4;
  localparam int unsigned N      = 4000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [HW_W-1:0]   hw_in = '0;
  logic              in_valid = 1'b0;
  logic [2*HW_W-1:0] var_out;
  logic              var_valid;
  int checks = 0, failures = 0;
  int samples [$];
  int exp_var = 0, max_var = 0;
  bit exp_valid = 1'b0;

  running_variance #(.HW_W(HW_W), .LOG2_T(LOG2_T)) dut (
    .clk(clk), .rst_n(rst_n), .hw_in(hw_in), .in_valid(in_valid),
    .var_out(var_out), .var_valid(var_valid));

  always #2.5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int window_var();
    int s = 0, sq = 0, n = samples.size();
    for (int i = n - int'(T); i < n; i++) begin
      s  += samples[i];
      sq += samples[i] * samples[i];
    end
    return (int'(T) * sq - s * s) / (int'(T) * int'(T));
  endfunction

  // Reference: outputs after this edge follow the window before it.
  always @(posedge clk) begin
    if (rst_n) begin
      exp_valid <= (samples.size() >= int'(T));
      exp_var   <= (samples.size() >= int'(T)) ? window_var() : 0;
      if (in_valid) samples.push_back(int'(hw_in));
    end
  end

  function automatic int next_sample(int k, int prev);
    case ((k / 50) % 5)
      0: return prev;                                            // steady
      1: return (k % 10 == 0) ? $urandom_range(0, 128) : prev;   // steps
      2: return (k % 2 != 0) ? 128 : 0;                             // full swing
      3: return 105 + $urandom_range(0, 2);                      // jitter, high level
      default: return $urandom_range(0, 128);                    // random
    endcase
  endfunction

  initial begin
    int prev;
    prev = 69;
    repeat (2) @(negedge clk);
    checks++;
    if (var_valid || var_out != '0) begin failures++; $display("FAIL reset state"); end
    for (int k = 0; k < int'(N); k++) begin
      @(negedge clk);
      if (k >= 1) begin
        checks++;
        if (var_valid !== exp_valid) begin
          failures++;
          $display("FAIL k=%0d var_valid=%0b expected %0b", k, var_valid, exp_valid);
        end
        if (exp_valid) begin
          if (exp_var > max_var) max_var = exp_var;
          checks++;
          if (int'(var_out) != exp_var) begin
            failures++;
            $display("FAIL k=%0d var=%0d expected %0d", k, var_out, exp_var);
          end
        end
      end
      rst_n = 1'b1;
      prev = next_sample(k, prev);
      hw_in = HW_W'(prev);
      in_valid = (k < 10) ? (k != 2) : ($urandom_range(0, 9) != 0);
    end
    $display("largest variance seen: %0d", max_var);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
