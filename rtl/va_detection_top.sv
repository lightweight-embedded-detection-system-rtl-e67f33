// va_detection_top: embedded detector for voltage-drop fault attacks in a
// multi-tenant FPGA.
//
// Another tenant on the same die can draw a burst of current (ring
// oscillators, for instance) that makes the shared supply sag for a few
// cycles and causes timing faults in the victim. This system watches the
// supply with NUM_SENSORS detection chains, one per sensor location, all on
// one clock (200 MHz in the evaluated system):
//
//   tdc_sensor -> hamming_weight -> running_variance -> threshold_detector
//
// Each chain reduces its TDC reading to a Hamming weight, takes the variance
// of the last 4 weights and flags an attack when it reaches 64. The variance
// ignores the level a sensor settles at, which differs widely from one
// placement to the next, so one threshold serves all sensors. attack_detected
// is the OR of the per-sensor flags.
//
// Latency: a supply change present at TDC sampling edge e0 is seen in hw at
// e1, enters the variance window at e2, reaches variance at e3 and sets
// alarm/attack_detected at e4, i.e. 4 cycles (20 ns at 200 MHz) after the
// sampling edge. After reset, each chain needs 5 edges to fill its window;
// until then var_valid is low and no alarm is raised.
//
// Interface: vdd_mv is a model-only input (the supply voltage at each sensor,
// in mV) that drives the behavioural TDC models; hw, variance and var_valid
// are brought out for observation. rst_n is asynchronous, active low.
//
// From the source design: the chain of four stages per sensor, three sensors
// with baselines 8, 69 and 107 taps, T = 4 and the threshold 64. This
// design's own choice: combining the sensors with an OR.
module va_detection_top #(
  parameter  int unsigned NUM_SENSORS = va_pkg::NUM_SENSORS,
  parameter  int unsigned TAPS        = va_pkg::TDC_TAPS,
  parameter  int unsigned LOG2_T      = va_pkg::VAR_LOG2_T,
  parameter  int unsigned THRESHOLD   = va_pkg::VAR_THRESHOLD,
  parameter  int unsigned BASELINE_TAPS [NUM_SENSORS] = '{8, 69, 107},
  localparam int unsigned HW_W        = va_pkg::hw_width(TAPS),
  localparam int unsigned VAR_W       = va_pkg::var_width(HW_W)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [15:0]            vdd_mv    [NUM_SENSORS],
  output logic [HW_W-1:0]        hw        [NUM_SENSORS],
  output logic [VAR_W-1:0]       variance  [NUM_SENSORS],
  output logic [NUM_SENSORS-1:0] var_valid,
  output logic [NUM_SENSORS-1:0] alarm,
  output logic                   attack_detected
);

  for (genvar s = 0; s < int'(NUM_SENSORS); s++) begin : g_chain
    logic [TAPS-1:0] taps;
    logic            hw_valid;

    tdc_sensor #(
      .TAPS          (TAPS),
      .BASELINE_TAPS (BASELINE_TAPS[s])
    ) u_tdc (
      .clk    (clk),
      .vdd_mv (vdd_mv[s]),
      .taps_q (taps)
    );

    hamming_weight #(.TAPS(TAPS)) u_hw (
      .clk   (clk),
      .rst_n (rst_n),
      .taps  (taps),
      .hw       (hw[s]),
      .hw_valid (hw_valid)
    );

    running_variance #(.HW_W(HW_W), .LOG2_T(LOG2_T)) u_var (
      .clk       (clk),
      .rst_n     (rst_n),
      .hw_in     (hw[s]),
      .in_valid  (hw_valid),
      .var_out   (variance[s]),
      .var_valid (var_valid[s])
    );

    threshold_detector #(.VAR_W(VAR_W), .THRESHOLD(THRESHOLD)) u_thr (
      .clk       (clk),
      .rst_n     (rst_n),
      .var_in    (variance[s]),
      .var_valid (var_valid[s]),
      .alarm     (alarm[s])
    );
  end

  assign attack_detected = |alarm;

endmodule
