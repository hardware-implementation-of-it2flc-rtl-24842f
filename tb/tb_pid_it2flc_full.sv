// tb_pid_it2flc_full: the controller at its default parameters (50 MHz
// clock, so a 0.01 s sampling time is 500,488 clocks) in PID structure with
// seven sets, closed around the plant 0.00995 z / (z - 0.99). Runs four
// complete sampling periods after reset and checks the sampling period, the
// latency of each computation and every control word against the
// floating-point reference controller.
module tb_pid_it2flc_full;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  localparam int SAMPLES = 4;

  logic  clk = 0, rst_n = 0;
  sig_t  setpoint, actual_output, control_signal;
  ts_t   ts;
  gain_t kp_pi, kd_pi, kout_pi, kp_pd, kd_pd, kout_pd;
  logic  c1, c2, c3, c4, c5, sample_done;
  int checks = 0, failures = 0;

  pid_it2flc dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clamp1(input real v);
    return (v > 1.0) ? 1.0 : (v < -1.0) ? -1.0 : v;
  endfunction

  initial begin
    real y, ts_r, e, de, e_prev, yl, yr, ypd, ypi, ypi_prev, ui_r, u_r, u_hw;
    longint period, t_prev, t_now;
    int lat;
    ts = 25'd164;
    kp_pi = 16'd358; kd_pi = 16'd2560; kout_pi = 16'd3584;
    kp_pd = 16'd256; kd_pd = 16'd256;  kout_pd = 16'd256;
    {c1, c2} = MODE_PID;
    {c3, c4, c5} = 3'd7;
    setpoint = sig_t'(2048);
    actual_output = '0;
    y = 0.0; e_prev = 0.0; ypi_prev = 0.0; ui_r = 0.0;
    ts_r = 164.0 / 16384.0;
    period = (164 * 64'd50_000_000) >> 14;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t_prev = 0;
    for (int k = 0; k < SAMPLES; k++) begin
      actual_output = sig_t'(int'($floor(y * 2048.0 + 0.5)));
      t_now = 0;
      while (!dut.tick) begin @(posedge clk); t_now++; end
      if (k > 0) begin
        checks++;
        if (t_now + t_prev != period) begin
          failures++; $display("FAIL sampling period %0d expected %0d", t_now + t_prev, period);
        end
      end
      lat = 0;
      do begin @(posedge clk); lat++; end while (!sample_done);
      t_prev = lat;
      @(negedge clk);
      checks++;
      if (lat > 200) begin failures++; $display("FAIL computation took %0d clocks", lat); end
      e  = (real'(setpoint) - real'(actual_output)) / 2048.0;
      de = (e - e_prev) / ts_r;
      fis_ref(7, clamp1(e * kp_pd / 256.0), clamp1(de * kd_pd / 256.0), yl, yr, ypd);
      fis_ref(7, clamp1(e * kp_pi / 256.0), clamp1(de * kd_pi / 256.0), yl, yr, ypi);
      ui_r = ui_r + ts_r * ypi_prev;
      ypi_prev = ypi;
      u_r  = ypd * kout_pd / 256.0 + ui_r * kout_pi / 256.0;
      u_hw = real'(control_signal) / 2048.0;
      checks++;
      if (u_hw - u_r > 0.02 || u_r - u_hw > 0.02) begin
        failures++; $display("FAIL sample %0d: u=%f expected %f", k, u_hw, u_r);
      end
      $display("sample %0d: e=%f u=%f (reference %f), %0d clocks", k, e, u_hw, u_r, lat);
      e_prev = e;
      y = 0.99 * y + 0.00995 * u_hw;
      @(posedge clk);
      t_prev++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
