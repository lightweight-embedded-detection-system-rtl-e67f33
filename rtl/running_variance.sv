// running_variance: variance of the last T Hamming-weight samples.
//
// A steady sensor reading, whatever its level, has a small variance; a steep
// voltage change inside the window makes it jump. Because no fixed baseline
// is involved, the same threshold works for every sensor location.
//
//   var = (1/T) * sum(HW^2) - ((1/T) * sum(HW))^2      over the last T samples
//       = (T * sum(HW^2) - sum(HW)^2) / T^2
//
// T = 2**LOG2_T, so the division is a right shift by 2*LOG2_T. It is applied
// once, after the subtraction, so the result is the exact variance rounded
// down. (Shifting each sum first would drop the fraction of the mean before
// squaring it, an error that grows with the Hamming weight: at a level near
// 107 it can turn a 2-tap jitter into a variance above 100.) By the
// Cauchy-Schwarz inequality the difference is never negative. The two sums
// are running sums: for every accepted sample, the sample and its square are
// added and the sample leaving the window (kept in a T-deep history) and its
// square are subtracted.
//
// Timing: in_valid qualifies hw_in; a sample is taken on each edge where
// in_valid is high (one per cycle in normal operation). The edge after a
// sample is taken, var_out holds the variance of the window ending with it.
// var_valid stays low after reset until T samples have been taken, so the
// start-up jump to the sensor's level is never reported.
//
// From the source design: the formula, T = 4 and shift-based division.
// This design's own choices: running sums with a sample history, a single
// shift after the subtraction, the two register stages, the valid signals
// and the reset (asynchronous, active low).
module running_variance #(
  parameter  int unsigned HW_W   = va_pkg::hw_width(va_pkg::TDC_TAPS),
  parameter  int unsigned LOG2_T = va_pkg::VAR_LOG2_T,
  localparam int unsigned T      = 1 << LOG2_T,
  localparam int unsigned SQ_W   = 2 * HW_W,
  localparam int unsigned SUM_W  = HW_W + LOG2_T,
  localparam int unsigned SSQ_W  = SQ_W + LOG2_T,
  localparam int unsigned NUM_W  = SQ_W + 2 * LOG2_T,
  localparam int unsigned VAR_W  = va_pkg::var_width(HW_W)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [HW_W-1:0]  hw_in,
  input  logic             in_valid,
  output logic [VAR_W-1:0] var_out,
  output logic             var_valid
);

  logic [HW_W-1:0]   hist [T];     // hist[0] newest, hist[T-1] oldest
  logic [SUM_W-1:0]  sum_q;
  logic [SSQ_W-1:0]  sumsq_q;
  logic [LOG2_T:0]   fill_q;       // samples in the window, saturates at T

  logic [SQ_W-1:0]   new_sq, old_sq;
  logic [NUM_W-1:0]  t_sumsq, sum_sq, numer;

  always_comb begin
    new_sq  = SQ_W'(hw_in) * SQ_W'(hw_in);
    old_sq  = SQ_W'(hist[T-1]) * SQ_W'(hist[T-1]);
    t_sumsq = NUM_W'(sumsq_q) << LOG2_T;            // T * sum(HW^2)
    sum_sq  = NUM_W'(sum_q) * NUM_W'(sum_q);        // sum(HW)^2
    numer   = t_sumsq - sum_sq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(T); i++) hist[i] <= '0;
      sum_q     <= '0;
      sumsq_q   <= '0;
      fill_q    <= '0;
      var_out   <= '0;
      var_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        hist[0] <= hw_in;
        for (int i = 1; i < int'(T); i++) hist[i] <= hist[i-1];
        sum_q   <= sum_q + SUM_W'(hw_in) - SUM_W'(hist[T-1]);
        sumsq_q <= sumsq_q + SSQ_W'(new_sq) - SSQ_W'(old_sq);
        if (fill_q != (LOG2_T+1)'(T)) fill_q <= fill_q + 1'b1;
      end
      var_out   <= VAR_W'(numer >> (2 * LOG2_T));
      var_valid <= (fill_q == (LOG2_T+1)'(T));
    end
  end

endmodule
