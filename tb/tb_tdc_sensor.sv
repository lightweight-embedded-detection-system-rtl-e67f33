// tb_tdc_sensor: self-checking test of the TDC behavioural model.
// Sweeps the supply input from far below to far above nominal and checks,
// one edge later, that the tap vector is a thermometer code whose length is
// BASELINE + (vdd - 850 mV) * 2, clamped to 0..128.
`timescale 1ns/1ps
module tb_tdc_sensor;
  localparam int unsigned TAPS = 128;
  localparam int unsigned BASE = 69;

  logic            clk = 1'b0;
  logic [15:0]     vdd_mv = 16'd850;
  logic [TAPS-1:0] taps_q;
  int checks = 0, failures = 0;

  tdc_sensor #(.TAPS(TAPS), .BASELINE_TAPS(BASE), .VNOM_MV(850), .TAPS_PER_MV(2)) dut (
    .clk(clk), .vdd_mv(vdd_mv), .taps_q(taps_q));

  always #2.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int mv);
    int e;
    logic [TAPS-1:0] want;
    @(negedge clk);
    vdd_mv = 16'(mv);
    @(negedge clk);
    e = int'(BASE) + (mv - 850) * 2;
    if (e < 0) e = 0;
    if (e > int'(TAPS)) e = int'(TAPS);
    want = '0;
    for (int i = 0; i < e; i++) want[i] = 1'b1;
    checks++;
    if (taps_q !== want) begin
      failures++;
      $display("FAIL vdd=%0d taps=%h expected %0d taps", mv, taps_q, e);
    end
  endtask

  initial begin
    apply(850);
    for (int mv = 780; mv <= 920; mv++) apply(mv);
    apply(0); apply(2000);
    for (int k = 0; k < 500; k++) apply($urandom_range(800, 900));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
