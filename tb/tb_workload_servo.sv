// tb_workload_servo: unit-step position response of a servo motor with
// friction, J x'' = u - F - T_L, where the friction torque combines stiction,
// Coulomb and viscous terms:
//   F = (Fs exp(-(v/vs)^2) + Fc (1 - exp(-(v/vs)^2)) + sigma |v|) sgn(v).
// The plant is integrated by the testbench in floating point (20 semi-implicit
// Euler steps per 0.01 s sample) and closed around the PID-like controller
// with seven sets. The plant constants are this testbench's own choice:
// J = 0.1, Fs = 0.2, Fc = 0.1, vs = 0.1, sigma = 0.5, T_L = 0; while the velocity is zero the motor stays at rest
// unless |u| exceeds Fs. The run is made twice: nominal, and with J, Fs, Fc
// and sigma raised by 10 % (parameter uncertainty). Each control word is
// checked against the floating-point reference controller; the position must
// stay bounded; the two responses must stay within 0.15 of each other at
// every sample (robustness to the uncertainty). Final positions are printed.
module tb_workload_servo;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  localparam longint unsigned CLK = 64'd20_000;
  localparam int SAMPLES = 1000;

  logic  clk = 0, rst_n = 0;
  sig_t  setpoint, actual_output, control_signal;
  ts_t   ts;
  gain_t kp_pi, kd_pi, kout_pi, kp_pd, kd_pd, kout_pd;
  logic  c1, c2, c3, c4, c5, sample_done;
  int checks = 0, failures = 0;
  real trace [SAMPLES];

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

  function automatic real sgn(input real v);
    return (v > 0.0) ? 1.0 : (v < 0.0) ? -1.0 : 0.0;
  endfunction

  task automatic run(input real scale, input bit compare);
    real x, v, J, Fs, Fc, vs, sg, fr, acc, h;
    real ts_r, e, de, e_prev, yl, yr, ypd, ypi, ypi_prev, ui_r, u_r, u_hw, dmax;
    longint ui_before;
    int bad;
    J = 0.1 * scale; Fs = 0.2 * scale; Fc = 0.1 * scale; vs = 0.1; sg = 0.5 * scale;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    x = 0.0; v = 0.0; e_prev = 0.0; ypi_prev = 0.0; dmax = 0.0; bad = 0;
    ts_r = real'(ts) / 16384.0;
    h = ts_r / 20.0;
    for (int k = 0; k < SAMPLES; k++) begin
      actual_output = sig_t'(int'($floor(x * 2048.0 + 0.5)));
      @(posedge clk iff dut.tick);
      ui_before = longint'(dut.ui);
      @(posedge clk iff sample_done);
      @(negedge clk);
      e  = (real'(setpoint) - real'(actual_output)) / 2048.0;
      de = (e - e_prev) / ts_r;
      fis_ref(7, clamp1(e * kp_pd / 256.0), clamp1(de * kd_pd / 256.0), yl, yr, ypd);
      fis_ref(7, clamp1(e * kp_pi / 256.0), clamp1(de * kd_pi / 256.0), yl, yr, ypi);
      ui_r = real'(ui_before) / 268435456.0 + ts_r * ypi_prev;
      ypi_prev = ypi;
      u_r  = ypd * kout_pd / 256.0 + ui_r * kout_pi / 256.0;
      if (u_r > 32767.0 / 2048.0) u_r = 32767.0 / 2048.0;
      if (u_r < -16.0) u_r = -16.0;
      u_hw = real'(control_signal) / 2048.0;
      checks++;
      if (u_hw - u_r > 0.03 || u_r - u_hw > 0.03) begin
        failures++;
        if (bad++ < 5) $display("FAIL sample %0d: u=%f expected %f", k, u_hw, u_r);
      end
      e_prev = e;
      for (int s = 0; s < 20; s++) begin
        if (v == 0.0 && (u_hw < Fs && u_hw > -Fs)) begin
          acc = 0.0;
        end else begin
          fr  = (Fs * $exp(-(v / vs) * (v / vs)) + Fc * (1.0 - $exp(-(v / vs) * (v / vs)))
                 + sg * ((v < 0.0) ? -v : v)) * sgn((v == 0.0) ? u_hw : v);
          acc = (u_hw - fr) / J;
        end
        if (v != 0.0 && sgn(v + acc * h) != sgn(v) && (u_hw < Fs && u_hw > -Fs)) v = 0.0;
        else v = v + acc * h;
        x = x + v * h;
      end
      checks++;
      if (x > 5.0 || x < -5.0) begin failures++; $display("FAIL position unbounded"); break; end
      if (compare) begin
        if (x - trace[k] > dmax) dmax = x - trace[k];
        if (trace[k] - x > dmax) dmax = trace[k] - x;
      end else begin
        trace[k] = x;
      end
    end
    $display("servo, parameters x%0.2f: position at %0.1f s = %f", scale, SAMPLES * ts_r, x);
    if (compare) begin
      $display("largest difference from the nominal response: %f", dmax);
      checks++;
      if (dmax > 0.15) begin failures++; $display("FAIL responses differ by %f", dmax); end
    end
  endtask

  initial begin
    ts = 25'd164;
    kp_pi = 16'd358; kd_pi = 16'd2560; kout_pi = 16'd3584;
    kp_pd = 16'd256; kd_pd = 16'd256;  kout_pd = 16'd256;
    {c1, c2} = MODE_PID;
    {c3, c4, c5} = 3'd7;
    setpoint = sig_t'(2048);
    actual_output = '0;
    run(1.0, 1'b0);
    run(1.1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
