// tb_pi_integrator: random increments and sampling times; the state must
// follow ui(k) = ui(k-1) + Ts * du(k-1) exactly (Q.28), hold while enable is
// low, and saturate at its positive limit under a long run of maximal input.
module tb_pi_integrator;
  import it2flc_pkg::*;
  logic clk = 0, rst_n = 0, update = 0, enable = 0;
  uni_t du;
  ts_t  ts;
  logic signed [INT_W-1:0] ui;
  int checks = 0, failures = 0, holds = 0, sats = 0;

  pi_integrator dut (.clk, .rst_n, .update, .enable, .du, .ts, .ui);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_ui = 0, prev_du = 0, lim;
    lim = (longint'(1) <<< (INT_W - 1)) - 1;
    du = 0; ts = 25'd164;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      du     = uni_t'($urandom_range(0, 32768) - 16384);
      ts     = (n % 2) ? 25'd164 : ts_t'($urandom_range(1, 100000));
      enable = (n % 5 != 4);
      @(negedge clk); update = 1; @(negedge clk); update = 0;
      if (enable) begin
        exp_ui += prev_du * longint'(ts);
        prev_du = longint'(du);
      end else holds++;
      checks++;
      if (longint'(ui) != exp_ui) begin failures++; $display("FAIL ui %0d exp %0d", ui, exp_ui); end
    end
    // drive to the positive limit
    enable = 1; du = 16'sd16384; ts = 25'h1ffffff;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); update = 1; @(negedge clk); update = 0;
      if (longint'(ui) == lim) sats++;
    end
    checks += 2;
    if (longint'(ui) != lim) begin failures++; $display("FAIL no saturation: %0d", ui); end
    if (holds == 0 || sats == 0) begin failures++; $display("FAIL hold/saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
