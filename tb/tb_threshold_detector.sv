// tb_threshold_detector: self-checking test of the threshold comparison.
// Sweeps the variance through 0..200, around the threshold (63, 64, 65) and
// through random values with var_valid both high and low, and checks that
// alarm, one edge later, is high exactly for valid variances of 64 or more.
`timescale 1ns/1ps
module tb_threshold_detector;
  localparam int unsigned VAR_W = 16;
  localparam int unsigned THR   = 64;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [VAR_W-1:0] var_in = '0;
  logic             var_valid = 1'b0;
  logic             alarm;
  int checks = 0, failures = 0;

  threshold_detector #(.VAR_W(VAR_W), .THRESHOLD(THR)) dut (
    .clk(clk), .rst_n(rst_n), .var_in(var_in), .var_valid(var_valid), .alarm(alarm));

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int v, bit valid);
    @(negedge clk);
    var_in = VAR_W'(v);
    var_valid = valid;
    @(negedge clk);
    checks++;
    if (alarm !== (valid && v >= int'(THR))) begin
      failures++;
      $display("FAIL var=%0d valid=%0b alarm=%0b", v, valid, alarm);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (alarm) begin failures++; $display("FAIL alarm set in reset"); end
    rst_n = 1'b1;
    for (int v = 0; v <= 200; v++) apply(v, 1'b1);
    for (int v = 60; v <= 70; v++) apply(v, 1'b0);
    apply(63, 1'b1); apply(64, 1'b1); apply(65, 1'b1); apply(64, 1'b0);
    apply(65535, 1'b1);
    for (int k = 0; k < 1000; k++) apply($urandom_range(0, 300), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
