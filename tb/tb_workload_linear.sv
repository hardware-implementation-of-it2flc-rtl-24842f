// tb_workload_linear: unit-step responses of the plant
//   y(z)/u(z) = 0.00995 z / (z - 0.99)
// under the P-, PD-, PI- and PID-like controller with seven sets, sampled at
// 0.01 s, for 20 s each: no load for the first 10 s, then a load equal to
// 10 % of the step subtracted from the plant output. The gains are the values
// shown in the reference Simulink structure (1.4, 10, 14 for the PI branch,
// 1, 1, 1 for the PD branch). The clock is scaled to 200 clocks per sample.
// Every control word is checked against the floating-point reference
// controller; the output must stay bounded. The PI- and PID-like controllers
// integrate the error until the scaled error enters the band where only the
// zero set of the seven-set partition fires (|KP_PI * e| < 0.15); there the
// increment is zero and it vanishes as the band edge is approached, so the
// output nears the edge only asymptotically: both halves must end within
// 0.15 / KP_PI (+0.02)
// of the set point. The PI and PID runs are repeated with KP_PI raised to 10,
// which narrows that band to 0.015. Rise time, peak and final values are
// printed.
module tb_workload_linear;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  localparam longint unsigned CLK = 64'd20_000;
  localparam int SAMPLES = 2000;

  logic  clk = 0, rst_n = 0;
  sig_t  setpoint, actual_output, control_signal;
  ts_t   ts;
  gain_t kp_pi, kd_pi, kout_pi, kp_pd, kd_pd, kout_pd;
  logic  c1, c2, c3, c4, c5, sample_done;
  int checks = 0, failures = 0;

  pid_it2flc #(.CLK_HZ(CLK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clamp1(input real v);
    return (v > 1.0) ? 1.0 : (v < -1.0) ? -1.0 : v;
  endfunction

  task automatic run(input mode_e md, input gain_t kpi);
    real y, ts_r, e, de, e_prev, yl, yr, ypd, ypi, ypi_prev, ui_r, u_r, u_hw, load, ymax, y10;
    longint ui_before;
    int t_rise, bad;
    real band;
    {c1, c2} = md;
    {c3, c4, c5} = 3'd7;
    kp_pi = kpi;
    band = 0.15 / (real'(kpi) / 256.0) + 0.02;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    y = 0.0; e_prev = 0.0; ypi_prev = 0.0; load = 0.0; ymax = -1.0; t_rise = -1; bad = 0;
    ts_r = real'(ts) / 16384.0;
    for (int k = 0; k < SAMPLES; k++) begin
      if (k == SAMPLES / 2) begin load = 0.1; y10 = y; end
      actual_output = sig_t'(int'($floor((y - load) * 2048.0 + 0.5)));
      @(posedge clk iff dut.tick);
      ui_before = longint'(dut.ui);
      @(posedge clk iff sample_done);
      @(negedge clk);
      e  = (real'(setpoint) - real'(actual_output)) / 2048.0;
      de = (e - e_prev) / ts_r;
      fis_ref(7, clamp1(e * kp_pd / 256.0), (md == MODE_P) ? 0.0 : clamp1(de * kd_pd / 256.0), yl, yr, ypd);
      fis_ref(7, clamp1(e * kp_pi / 256.0), clamp1(de * kd_pi / 256.0), yl, yr, ypi);
      ui_r = real'(ui_before) / 268435456.0;
      if (md == MODE_PI || md == MODE_PID) begin
        ui_r += ts_r * ypi_prev;
        ypi_prev = ypi;
      end
      case (md)
        MODE_P, MODE_PD: u_r = ypd * kout_pd / 256.0;
        MODE_PI:         u_r = ui_r * kout_pi / 256.0;
        default:         u_r = ypd * kout_pd / 256.0 + ui_r * kout_pi / 256.0;
      endcase
      u_hw = real'(control_signal) / 2048.0;
      checks++;
      if (u_hw - u_r > 0.02 || u_r - u_hw > 0.02) begin
        failures++;
        if (bad++ < 5) $display("FAIL mode %0d sample %0d: u=%f expected %f", md, k, u_hw, u_r);
      end
      e_prev = e;
      y = 0.99 * y + 0.00995 * u_hw;
      if (k < SAMPLES / 2 && y > ymax) ymax = y;
      if (t_rise < 0 && y >= 0.9) t_rise = k;
      checks++;
      if (y > 3.0 || y < -3.0) begin failures++; $display("FAIL output unbounded"); break; end
    end
    $display("%s, KP_PI=%0.2f: output at 10 s %f, peak %f, 90%% rise at %0d samples, output at 20 s (10%% load) %f",
             md.name(), real'(kpi) / 256.0, y10, ymax, t_rise, y - load);
    if (md == MODE_PI || md == MODE_PID) begin
      checks += 2;
      if (y10 < 1.0 - band || y10 > 1.05) begin failures++; $display("FAIL %s no-load error", md.name()); end
      if (y - load < 1.0 - band || y - load > 1.05) begin failures++; $display("FAIL %s load not rejected", md.name()); end
    end
  endtask

  initial begin
    ts = 25'd164;
    kp_pi = 16'd358; kd_pi = 16'd2560; kout_pi = 16'd3584;
    kp_pd = 16'd256; kd_pd = 16'd256;  kout_pd = 16'd256;
    setpoint = sig_t'(2048);
    actual_output = '0;
    run(MODE_P, 16'd358);
    run(MODE_PD, 16'd358);
    run(MODE_PI, 16'd358);
    run(MODE_PID, 16'd358);
    run(MODE_PI, 16'd2560);
    run(MODE_PID, 16'd2560);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
