// hamming_weight: registered population count of the TDC tap vector.
//
// The TDC output is reduced to one number, the count of its set taps, which
// follows the supply voltage wherever the sensor sits and whatever its exact
// bit pattern (bubbles in the thermometer code count the same). The bits are
// summed by an adder chain, written here as a loop that synthesis turns into
// an adder tree, and the result is registered.
//
// Interface: taps is the registered TDC vector; hw is its Hamming weight,
// HW_W = clog2(TAPS+1) bits (8 bits for 128 taps), one cycle later. hw_valid
// marks hw as a real sample: it is low while rst_n (asynchronous, active
// low) holds hw cleared, and high from the first edge after reset.
//
// From the source design: using the Hamming weight of the TDC output as the
// sensor reading, and the 8-bit registered result. This design's own choice:
// the reset and the valid flag.
module hamming_weight #(
  parameter int unsigned TAPS = va_pkg::TDC_TAPS,
  localparam int unsigned HW_W = va_pkg::hw_width(TAPS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TAPS-1:0] taps,
  output logic [HW_W-1:0] hw,
  output logic            hw_valid
);

  logic [HW_W-1:0] count;

  always_comb begin
    count = '0;
    for (int i = 0; i < int'(TAPS); i++)
      count = count + HW_W'(taps[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hw       <= '0;
      hw_valid <= 1'b0;
    end else begin
      hw       <= count;
      hw_valid <= 1'b1;
    end
  end

endmodule
