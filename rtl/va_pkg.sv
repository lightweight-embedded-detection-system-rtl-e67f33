// va_pkg: constants shared by the voltage-drop attack detector.
//
// The detector watches the supply voltage of an FPGA region through a
// time-to-digital converter (TDC) and flags a fault attack when the
// variance of the TDC's Hamming weight over a short window gets large.
// The numbers below are the configuration the detector was evaluated in:
// a 128-tap TDC, a 4-sample variance window and a detection threshold of 64,
// with three sensors placed at different spots of the die. The helper
// functions size the datapath from those numbers.
package va_pkg;

  // Taps of the TDC delay line (16 carry blocks of 8 taps).
  localparam int unsigned TDC_TAPS      = 128;
  // log2 of the variance window T; T = 4 samples.
  localparam int unsigned VAR_LOG2_T    = 2;
  // Variance at which an attack is reported.
  localparam int unsigned VAR_THRESHOLD = 64;
  // Number of sensors (and detection chains) in the evaluated system.
  localparam int unsigned NUM_SENSORS   = 3;

  // Width of a Hamming weight able to count 0..taps.
  function automatic int unsigned hw_width(int unsigned taps);
    return $clog2(taps + 1);
  endfunction

  // Width of a variance computed from hw_w-bit samples: the variance never
  // exceeds the mean of the squares, which fits in 2*hw_w bits.
  function automatic int unsigned var_width(int unsigned hw_w);
    return 2 * hw_w;
  endfunction

endpackage
