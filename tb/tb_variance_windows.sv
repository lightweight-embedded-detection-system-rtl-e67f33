// tb_variance_windows: runs the windowed variance at the window sizes
// compared when choosing T (4, 8, 16, 32 and 64 samples) on one common
// stream of 8-bit Hamming weights: a steady level with jitter, interrupted by
// attack-like dips and overshoots. Each instance is checked every cycle
// against floor((T*sum(x^2) - sum(x)^2) / T^2) over its last T samples, and
// the peak variance and the number of cycles spent at or above 64 are
// reported per window size: larger windows give higher, longer peaks.
`timescale 1ns/1ps
module tb_variance_windows;
  localparam int NW = 5;
  localparam int N  = 6000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] hw_in = 8'd77;
  logic       in_valid = 1'b0;
  logic [15:0] var_out [NW];
  logic [NW-1:0] var_valid;
  int checks = 0, failures = 0;
  int samples [$];
  int peak [NW], above [NW];

  for (genvar w = 0; w < NW; w++) begin : g_win
    running_variance #(.HW_W(8), .LOG2_T(w + 2)) dut (
      .clk(clk), .rst_n(rst_n), .hw_in(hw_in), .in_valid(in_valid),
      .var_out(var_out[w]), .var_valid(var_valid[w]));
  end

  always #2.5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int window_var(int t);
    int s = 0, sq = 0, n = samples.size();
    for (int i = n - t; i < n; i++) begin
      s  += samples[i];
      sq += samples[i] * samples[i];
    end
    return (t * sq - s * s) / (t * t);
  endfunction

  bit exp_valid [NW];
  int exp_var [NW];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int w = 0; w < NW; w++) begin
        exp_valid[w] <= samples.size() >= (4 << w);
        exp_var[w]   <= (samples.size() >= (4 << w)) ? window_var(4 << w) : 0;
      end
      if (in_valid) samples.push_back(int'(hw_in));
    end
  end

  // Attack-like profile: dip to a few taps, overshoot, settle (period 150).
  function automatic int profile(int k);
    int p = k % 150;
    if (p >= 69 && p < 72) return 6;
    if (p >= 72 && p < 74) return 25;
    if (p >= 74 && p < 78) return 94;
    if (p >= 78 && p < 80) return 123;
    if (p >= 80 && p < 84) return 98;
    if (p >= 84 && p < 90) return 38;
    if (p >= 90 && p < 100) return 84;
    return 77 - $urandom_range(0, 2);
  endfunction

  initial begin
    for (int w = 0; w < NW; w++) begin peak[w] = 0; above[w] = 0; end
    repeat (2) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      if (k >= 1) begin
        for (int w = 0; w < NW; w++) begin
          checks++;
          if (var_valid[w] !== exp_valid[w]) begin
            failures++;
            $display("FAIL T=%0d k=%0d var_valid=%0b", 4 << w, k, var_valid[w]);
          end
          if (exp_valid[w]) begin
            checks++;
            if (int'(var_out[w]) != exp_var[w]) begin
              failures++;
              $display("FAIL T=%0d k=%0d var=%0d expected %0d", 4 << w, k, var_out[w], exp_var[w]);
            end
            if (exp_var[w] > peak[w]) peak[w] = exp_var[w];
            if (exp_var[w] >= 64) above[w]++;
          end
        end
      end
      rst_n = 1'b1;
      in_valid = 1'b1;
      hw_in = 8'(profile(k));
    end
    for (int w = 0; w < NW; w++)
      $display("T=%0d: peak variance %0d, cycles at or above 64: %0d", 4 << w, peak[w], above[w]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
