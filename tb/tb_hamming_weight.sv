// tb_hamming_weight: self-checking test of the registered population count.
// Drives corner vectors (all zero, all one, single bits, thermometer codes)
// and random vectors with random densities, and checks that hw equals the
// number of set bits of the vector presented one edge earlier, and that
// hw_valid is low in reset and high after it.
`timescale 1ns/1ps
module tb_hamming_weight;
  localparam int unsigned TAPS = 128;
  localparam int unsigned HW_W = 8;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [TAPS-1:0] taps = '0;
  logic [HW_W-1:0] hw;
  logic            hw_valid;
  int checks = 0, failures = 0;

  hamming_weight #(.TAPS(TAPS)) dut (.clk(clk), .rst_n(rst_n), .taps(taps), .hw(hw), .hw_valid(hw_valid));

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference count, one bit at a time.
  function automatic int ones(logic [TAPS-1:0] v);
    int n = 0;
    for (int i = 0; i < int'(TAPS); i++) if (v[i]) n++;
    return n;
  endfunction

  task automatic apply(logic [TAPS-1:0] v);
    @(negedge clk);
    taps = v;
    @(negedge clk);
    checks++;
    if (int'(hw) != ones(v) || !hw_valid) begin
      failures++;
      $display("FAIL taps=%h hw=%0d expected %0d", v, hw, ones(v));
    end
  endtask

  initial begin
    logic [TAPS-1:0] v;
    repeat (2) @(negedge clk);
    checks++;
    if (hw != '0 || hw_valid) begin failures++; $display("FAIL hw not cleared by reset"); end
    rst_n = 1'b1;
    apply('0);
    apply('1);
    for (int i = 0; i < int'(TAPS); i++) apply(TAPS'(1) << i);
    for (int n = 0; n <= int'(TAPS); n += 7) begin
      v = '0;
      for (int i = 0; i < n; i++) v[i] = 1'b1;
      apply(v);
    end
    for (int k = 0; k < 1000; k++) begin
      automatic int unsigned density = $urandom_range(0, 100);
      for (int i = 0; i < int'(TAPS); i++) v[i] = ($urandom_range(0, 99) < density);
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
