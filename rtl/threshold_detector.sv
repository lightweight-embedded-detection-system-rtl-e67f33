// threshold_detector: compares the running variance with the detection
// threshold and raises the attack flag.
//
// The threshold sits between the variance that background activity produces
// (an AES noise generator switching on gave values up to 60) and the variance
// that an attack produces (80 and above). alarm is registered: it is high in
// the cycle after a valid variance at or above THRESHOLD was presented, and
// stays low while var_valid is low.
//
// Interface: var_in / var_valid from running_variance; alarm, one cycle later.
// rst_n (asynchronous, active low) clears alarm.
//
// From the source design: the threshold value 64 and a single registered
// comparison per sensor. This design's own choices: "at or above" as the
// comparison, no latching of the flag (it follows the variance cycle by
// cycle), and the reset.
module threshold_detector #(
  parameter int unsigned VAR_W     = va_pkg::var_width(va_pkg::hw_width(va_pkg::TDC_TAPS)),
  parameter int unsigned THRESHOLD = va_pkg::VAR_THRESHOLD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VAR_W-1:0] var_in,
  input  logic             var_valid,
  output logic             alarm
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alarm <= 1'b0;
    else        alarm <= var_valid && (var_in >= VAR_W'(THRESHOLD));
  end

endmodule
