// tb_pid_it2flc: end-to-end test of the controller in closed loop with the
// first-order plant y(z)/u(z) = 0.00995 z / (z - 0.99), evaluated in floating
// point by the testbench once per sampling instant.
//
// Eleven phases cover all four structures (P, PD, PI, PID), all six
// partition sizes (2..7 sets) and three sampling times (0.01 s, 0.05 s and
// 0.5 s); each phase starts with a push-button reset and
// a unit step of the set point, and halfway through a 10 % load disturbance
// is subtracted from the plant output. Every control word is compared with a
// floating-point model of the whole controller (error, rate, gains and
// limiting, both fuzzy systems via the exhaustive reference, integrator,
// output gains and selection); the model takes the integral state from the
// hardware at each sample, so each check covers one integration step.
// The sampling period must be met: sample_done within 200 clocks, and the
// distance between sampling instants must equal floor(Ts * CLK_HZ / 2^14).
// Mechanisms counted (each must occur): every structure, every partition
// size, input limiting to +-1, integrator hold outside PI/PID, early stop of
// the EIASC search, load disturbance, reset, change of sampling time.
module tb_pid_it2flc;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  localparam longint unsigned CLK = 64'd20_000;   // 0.01 s = 200 clocks
  localparam int SAMPLES = 120;

  logic  clk = 0, rst_n = 0;
  sig_t  setpoint, actual_output, control_signal;
  ts_t   ts;
  gain_t kp_pi, kd_pi, kout_pi, kp_pd, kd_pd, kout_pd;
  logic  c1, c2, c3, c4, c5, sample_done;
  int checks = 0, failures = 0;
  int n_mode [4], n_m [8], n_limit = 0, n_hold = 0, n_early = 0, n_load = 0, n_reset = 0;
  int n_ts = 0;
  longint cyc = 0;
  ts_t ts_last = '0;

  pid_it2flc #(.CLK_HZ(CLK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && dut.u_pd.u_tr.state == dut.u_pd.u_tr.S_ITER && !dut.u_pd.u_tr.l_done &&
        dut.u_pd.u_tr.stop_l && dut.u_pd.u_tr.lp < dut.u_pd.u_tr.ms - 3'd2)
      n_early++;

  function automatic real clamp1(input real v);
    return (v > 1.0) ? 1.0 : (v < -1.0) ? -1.0 : v;
  endfunction

  task automatic run_phase(input mode_e md, input int mm, input ts_t tsv);
    real y, ts_r, e, de, e_prev, x1, x2, q1, q2, yl, yr, ypd, ypi, ypi_prev, ui_r, u_r, u_hw, load, tol;
    longint ui_before, t_tick, t_prev, period;
    int lat;
    if (tsv != ts_last) n_ts++;
    ts_last = tsv;
    ts = tsv;
    period = (longint'(tsv) * longint'(CLK)) >>> TS_FRAC;
    t_prev = 0;
    {c1, c2} = md;
    {c3, c4, c5} = 3'(mm);
    n_mode[md]++;
    n_m[mm]++;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_reset++;
    y = 0.0; e_prev = 0.0; ypi_prev = 0.0; load = 0.0;
    ts_r = real'(ts) / 16384.0;
    setpoint = sig_t'(2048);   // unit step
    for (int k = 0; k < SAMPLES; k++) begin
      if (k == SAMPLES / 2) begin load = 0.1; n_load++; end
      actual_output = sig_t'(int'($floor((y - load) * 2048.0 + 0.5)));
      @(posedge clk iff dut.tick);
      t_tick = cyc;
      if (k > 0) begin
        checks++;
        if (t_tick - t_prev != period) begin
          failures++;
          $display("FAIL Ts=%0d: sampling instants %0d clocks apart, expected %0d",
                   tsv, t_tick - t_prev, period);
        end
      end
      t_prev = t_tick;
      ui_before = longint'(dut.ui);
      lat = 0;
      do begin @(posedge clk); lat++; end while (!sample_done);
      @(negedge clk);
      checks++;
      if (lat > 200) begin failures++; $display("FAIL sample took %0d clocks", lat); end
      // reference controller
      e  = (real'(setpoint) - real'(actual_output)) / 2048.0;
      de = (e - e_prev) / ts_r;
      x1 = clamp1(e * kp_pd / 256.0);
      x2 = (md == MODE_P) ? 0.0 : clamp1(de * kd_pd / 256.0);
      q1 = clamp1(e * kp_pi / 256.0);
      q2 = clamp1(de * kd_pi / 256.0);
      if (x2 == 1.0 || x2 == -1.0 || q2 == 1.0 || q2 == -1.0) n_limit++;
      fis_ref(mm, x1, x2, yl, yr, ypd);
      fis_ref(mm, q1, q2, yl, yr, ypi);
      if (md == MODE_PI || md == MODE_PID) begin
        ui_r = real'(ui_before) / 268435456.0 + ts_r * ypi_prev;
        ypi_prev = ypi;
      end else begin
        ui_r = real'(ui_before) / 268435456.0;
        checks++;
        if (longint'(dut.ui) != ui_before) begin failures++; $display("FAIL integrator moved"); end
        else n_hold++;
      end
      case (md)
        MODE_P, MODE_PD: u_r = ypd * kout_pd / 256.0;
        MODE_PI:         u_r = ui_r * kout_pi / 256.0;
        default:         u_r = ypd * kout_pd / 256.0 + ui_r * kout_pi / 256.0;
      endcase
      if (u_r > 32767.0 / 2048.0) u_r = 32767.0 / 2048.0;
      if (u_r < -16.0) u_r = -16.0;
      u_hw = real'(control_signal) / 2048.0;
      // fixed-point error of the fuzzy systems, seen through the output gain of
      // the PD branch and through one integration step of the PI branch
      tol = 0.01 + 0.004 * kout_pd / 256.0;
      if (md == MODE_PI || md == MODE_PID) tol += ts_r * 0.004 * kout_pi / 256.0;
      checks++;
      if (u_hw - u_r > tol || u_r - u_hw > tol) begin
        failures++;
        $display("FAIL mode %0d m=%0d sample %0d: u=%f expected %f", md, mm, k, u_hw, u_r);
      end
      e_prev = e;
      // plant: y(k+1) = 0.99 y(k) + 0.00995 u(k)
      y = 0.99 * y + 0.00995 * u_hw;
    end
    $display("phase mode %0d m=%0d Ts=%0d: final output %f", md, mm, tsv, y - load);
  endtask

  initial begin
    ts = 25'd164;  // 0.01 s
    kp_pi = 16'd358; kd_pi = 16'd2560; kout_pi = 16'd3584;   // 1.4, 10, 14
    kp_pd = 16'd256; kd_pd = 16'd256;  kout_pd = 16'd256;    // 1, 1, 1
    setpoint = '0; actual_output = '0;
    {c1, c2, c3, c4, c5} = '0;
    run_phase(MODE_P, 7, 25'd164);
    run_phase(MODE_PD, 7, 25'd164);
    run_phase(MODE_PI, 7, 25'd164);
    run_phase(MODE_PID, 7, 25'd164);
    run_phase(MODE_PID, 2, 25'd164);
    run_phase(MODE_PD, 3, 25'd164);
    run_phase(MODE_PI, 4, 25'd164);
    run_phase(MODE_PID, 5, 25'd164);
    run_phase(MODE_P, 6, 25'd164);
    run_phase(MODE_PID, 7, 25'd819);    // 0.05 s
    run_phase(MODE_PI, 7, 25'd8192);    // 0.5 s
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL structure %0d never run", i); end
    end
    for (int i = 2; i <= 7; i++) begin
      checks++;
      if (n_m[i] == 0) begin failures++; $display("FAIL %0d sets never run", i); end
    end
    checks += 6;
    if (n_ts < 3)     begin failures++; $display("FAIL sampling time changed only %0d times", n_ts); end
    if (n_limit == 0) begin failures++; $display("FAIL input limiting never happened"); end
    if (n_hold == 0)  begin failures++; $display("FAIL integrator hold never happened"); end
    if (n_early == 0) begin failures++; $display("FAIL EIASC early stop never happened"); end
    if (n_load == 0)  begin failures++; $display("FAIL load never applied"); end
    if (n_reset == 0) begin failures++; $display("FAIL reset never applied"); end
    $display("mechanisms: limit %0d hold %0d early-stop %0d load %0d reset %0d Ts-change %0d",
             n_limit, n_hold, n_early, n_load, n_reset, n_ts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
