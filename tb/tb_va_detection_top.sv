// tb_va_detection_top: end-to-end test of the three-sensor detector at its
// default configuration (128-tap TDCs with baselines 8, 69 and 107, window
// of 4, threshold 64).
//
// The supply at each sensor is driven directly. Quiet periods hold it at
// 850 mV with 0/-1 mV jitter. A noise event (a neighbouring AES switching on)
// lowers it by 5-6 mV for 5-20 cycles at every sensor. An attack (ring
// oscillators switching on) lowers it by A = 20-40 mV for 2-10 cycles and
// then overshoots by A/2 for 3 cycles; the sensors, at different distances,
// see 10/10, 8/10 and 6/10 of that.
//
// 32768 attacks are run, each followed by a noise event, as in the
// evaluation's 32K attack attempts.
//
// A reference model, written from the TDC law, the definition of the
// Hamming weight and the variance formula with no regard to the pipeline's
// registers, predicts hw, variance, var_valid, alarm and attack_detected for
// every sensor after every edge, and all are compared. The test also counts
// the mechanisms of the design and fails if one never happens: attacks
// detected exactly 4 cycles after the first sampling edge that sees them,
// noise events passed without alarm, the start-up window (var_valid low
// while hw jumps from 0 to its level), an alarm from each sensor and TDC
// saturation at 0 or 128 taps.
`timescale 1ns/1ps
module tb_va_detection_top;
  localparam int NS        = 3;
  localparam int TAPS      = 128;
  localparam int THR       = 64;
  localparam int VNOM      = 850;
  localparam int N_ATTACKS = 32768;   // attack attempts, as in the evaluation
  localparam int MAXE      = 2_600_000;
  localparam int BASE [NS] = '{8, 69, 107};
  localparam int SCALE [NS] = '{10, 8, 6};

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] vdd_mv [NS];
  logic [7:0]  hw [NS];
  logic [15:0] variance [NS];
  logic [NS-1:0] var_valid, alarm;
  logic        attack_detected;

  va_detection_top dut (
    .clk(clk), .rst_n(rst_n), .vdd_mv(vdd_mv), .hw(hw), .variance(variance),
    .var_valid(var_valid), .alarm(alarm), .attack_detected(attack_detected));

  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  int edge_no = 0;           // edges since time 0
  int rel_edge = -1;         // first edge with rst_n high
  int v_hist [NS][MAXE];     // supply seen by each sensor at each edge

  // mechanism counters
  int attacks = 0, attacks_detected = 0, delay_ok = 0;
  int noise_events = 0, noise_clean = 0;
  int startup_suppressed = 0, saturations = 0;
  int sensor_alarms [NS];

  initial begin
    repeat (MAXE - 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int s = 0; s < NS; s++) v_hist[s][edge_no] = int'(vdd_mv[s]);
    if (rst_n && rel_edge < 0) rel_edge = edge_no;
    edge_no++;
  end

  // Taps reached for a supply voltage: the TDC law, clamped.
  function automatic int reached(int s, int mv);
    int r = BASE[s] + (mv - VNOM) * 2;
    return (r < 0) ? 0 : (r > TAPS) ? TAPS : r;
  endfunction

  // Expected Hamming weight after edge e: the taps captured at edge e-1.
  function automatic int hw_at(int s, int e);
    return reached(s, v_hist[s][e-1]);
  endfunction

  // Variance after edge e: window of the weights present before edges
  // e-1 .. e-4, i.e. hw after edges e-2 .. e-5, taken by the variance stage.
  function automatic bit var_valid_at(int e);
    return (rel_edge >= 0) && (e - 5 >= rel_edge);
  endfunction

  function automatic int var_at(int s, int e);
    int sum = 0, sq = 0, x;
    for (int k = 2; k <= 5; k++) begin
      x = hw_at(s, e - k);
      sum += x;
      sq  += x * x;
    end
    return (4 * sq - sum * sum) / 16;
  endfunction

  function automatic bit alarm_at(int s, int e);
    return var_valid_at(e - 1) && var_at(s, e - 1) >= THR;
  endfunction

  // Compare every output after edge e (called at the following negedge).
  bit any_alarm_seen;
  int first_alarm_edge;
  always @(negedge clk) begin
    automatic int e = edge_no - 1;
    automatic bit exp_any = 1'b0;
    if (rel_edge >= 0 && e >= rel_edge) begin
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (int'(hw[s]) != hw_at(s, e)) begin
          failures++;
          $display("FAIL e=%0d s=%0d hw=%0d expected %0d", e, s, hw[s], hw_at(s, e));
        end
        if (hw_at(s, e) == 0 || hw_at(s, e) == TAPS) saturations++;
        checks++;
        if (var_valid[s] !== var_valid_at(e)) begin
          failures++;
          $display("FAIL e=%0d s=%0d var_valid=%0b", e, s, var_valid[s]);
        end
        if (var_valid_at(e)) begin
          checks++;
          if (int'(variance[s]) != var_at(s, e)) begin
            failures++;
            $display("FAIL e=%0d s=%0d var=%0d expected %0d", e, s, variance[s], var_at(s, e));
          end
        end
        if (e >= rel_edge + 1) begin
          checks++;
          if (alarm[s] !== alarm_at(s, e)) begin
            failures++;
            $display("FAIL e=%0d s=%0d alarm=%0b expected %0b", e, s, alarm[s], alarm_at(s, e));
          end
          exp_any |= alarm_at(s, e);
        end
        if (alarm[s]) sensor_alarms[s]++;
      end
      checks++;
      if (attack_detected !== exp_any) begin
        failures++;
        $display("FAIL e=%0d attack_detected=%0b", e, attack_detected);
      end
    end
    if (attack_detected && !any_alarm_seen) first_alarm_edge = e;
    if (attack_detected) any_alarm_seen = 1'b1;
  end

  task automatic quiet(int cycles);
    repeat (cycles) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) vdd_mv[s] = 16'(VNOM - $urandom_range(0, 1));
    end
  endtask

  // Edge number at which the next supply value set now will be sampled.
  function automatic int next_edge();
    return edge_no;
  endfunction

  task automatic noise_event();
    int amp = $urandom_range(5, 6);
    int len = $urandom_range(5, 20);
    noise_events++;
    any_alarm_seen = 1'b0;
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) vdd_mv[s] = 16'(VNOM - amp - $urandom_range(0, 1));
    end
    quiet(12);
    if (!any_alarm_seen) noise_clean++;
    else begin
      failures++;
      $display("FAIL noise event (%0d mV, %0d cycles) raised an alarm", amp, len);
    end
  endtask

  task automatic attack();
    int amp = $urandom_range(20, 40);
    int len = $urandom_range(2, 10);
    int e0;
    attacks++;
    @(negedge clk);
    any_alarm_seen = 1'b0;
    e0 = next_edge();
    for (int c = 0; c < len + 3; c++) begin
      if (c > 0) @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        int d = (c < len) ? -amp : amp / 2;
        vdd_mv[s] = 16'(VNOM + d * SCALE[s] / 10);
      end
    end
    for (int c = 0; c < 14; c++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) vdd_mv[s] = 16'(VNOM - $urandom_range(0, 1));
    end
    if (any_alarm_seen) attacks_detected++;
    else begin
      failures++;
      $display("FAIL attack (%0d mV, %0d cycles) not detected", amp, len);
    end
    if (any_alarm_seen && first_alarm_edge - e0 == 4) delay_ok++;
    else begin
      failures++;
      $display("FAIL attack detection delay %0d cycles, expected 4", first_alarm_edge - e0);
    end
    quiet(6);
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      vdd_mv[s] = 16'(VNOM);
      sensor_alarms[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Start-up: hw jumps from 0 to each baseline while the window fills.
    repeat (8) begin
      @(negedge clk);
      if (var_valid == '0 && hw[2] == 8'(BASE[2]) && !attack_detected) startup_suppressed++;
    end
    checks++;
    if (attack_detected) begin failures++; $display("FAIL alarm after start-up"); end
    // Location: exact baselines at the nominal supply.
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (int'(hw[s]) != BASE[s]) begin
        failures++;
        $display("FAIL sensor %0d baseline %0d, expected %0d", s, hw[s], BASE[s]);
      end
    end
    quiet(10);
    for (int k = 0; k < N_ATTACKS; k++) begin
      attack();
      quiet($urandom_range(0, 10));
      noise_event();
      quiet($urandom_range(0, 10));
    end
    $display("attacks %0d detected %0d (delay 4 cycles: %0d); noise events %0d without alarm %0d",
             attacks, attacks_detected, delay_ok, noise_events, noise_clean);
    $display("start-up cycles suppressed %0d; saturated samples %0d; alarms per sensor %0d %0d %0d",
             startup_suppressed, saturations, sensor_alarms[0], sensor_alarms[1], sensor_alarms[2]);
    checks++; if (attacks_detected == 0)   begin failures++; $display("FAIL no attack detected"); end
    checks++; if (delay_ok == 0)           begin failures++; $display("FAIL no 4-cycle detection"); end
    checks++; if (noise_clean == 0)        begin failures++; $display("FAIL no clean noise event"); end
    checks++; if (startup_suppressed == 0) begin failures++; $display("FAIL start-up window not seen"); end
    checks++; if (saturations == 0)        begin failures++; $display("FAIL no TDC saturation"); end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (sensor_alarms[s] == 0) begin failures++; $display("FAIL sensor %0d never alarmed", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
