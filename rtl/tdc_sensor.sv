// tdc_sensor: behavioural model of a carry-chain time-to-digital converter.
//
// This is a behavioural model, not the sensor itself. The real sensor launches
// the sampling clock into a delay line (a few LUTs of initial delay followed
// by a carry chain of TAPS stages) and captures every tap in a register on
// the same clock. How far the clock edge travels along the chain before the
// capture depends on the propagation delay, and so on the local supply
// voltage: a lower voltage slows the chain and fewer taps are reached. That
// analog timing cannot be written as logic, so the model computes the number
// of taps reached from a supply-voltage input:
//
//   reached = BASELINE_TAPS + (vdd_mv - VNOM_MV) * TAPS_PER_MV, clamped to 0..TAPS
//
// and registers a thermometer code with the first `reached` taps set. The
// Hamming weight of taps_q is therefore `reached` of the previous edge.
//
// Interface: clk samples the line (200 MHz in the evaluated system); vdd_mv
// is a model-only input giving the supply voltage at the sensor in mV;
// taps_q is the registered tap vector, valid one edge after vdd_mv.
//
// From the source design: the structure (initial delay, carry taps, one
// register per tap on the same clock), 128 taps, and per-location baselines
// (8, 69 and 107 for the three evaluated sensors). This design's own choice:
// the linear voltage-to-taps law, its nominal voltage and slope, and the
// thermometer-shaped output.
module tdc_sensor #(
  parameter int unsigned TAPS          = va_pkg::TDC_TAPS,
  parameter int unsigned BASELINE_TAPS = 69,
  parameter int unsigned VNOM_MV       = 850,
  parameter int unsigned TAPS_PER_MV   = 2
) (
  input  logic            clk,
  input  logic [15:0]     vdd_mv,
  output logic [TAPS-1:0] taps_q
);

  int reached;

  always_comb begin
    reached = int'(BASELINE_TAPS)
            + (int'(vdd_mv) - int'(VNOM_MV)) * int'(TAPS_PER_MV);
    if (reached < 0)          reached = 0;
    if (reached > int'(TAPS)) reached = int'(TAPS);
  end

  // One capture register per tap, all on the launching clock.
  always_ff @(posedge clk) begin
    for (int i = 0; i < int'(TAPS); i++)
      taps_q[i] <= (i < reached);
  end

endmodule
