// tb_output_mux: random branch outputs, integrals and output gains in all four
// structures; the control word must equal the gained and selected sum worked
// out in floating point (within 1 LSB of Q5.11 per summed branch), saturated to 16 bits.
module tb_output_mux;
  import it2flc_pkg::*;
  mode_e mode;
  uni_t  y_pd;
  logic signed [INT_W-1:0] ui;
  gain_t kout_pd, kout_pi;
  sig_t  u;
  int checks = 0, failures = 0, sat = 0;
  int seen [4];

  output_mux dut (.mode, .y_pd, .ui, .kout_pd, .kout_pi, .u);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real upd, upi, r, tol;
    for (int n = 0; n < 4000; n++) begin
      mode    = mode_e'(n % 4);
      y_pd    = uni_t'($urandom_range(0, 32768) - 16384);
      ui      = INT_W'(longint'($urandom_range(0, 2000000)) * 1024 - 1024000000);
      kout_pd = gain_t'($urandom_range(0, (n % 8 < 4) ? 4096 : 65535));
      kout_pi = gain_t'($urandom_range(0, (n % 8 < 4) ? 4096 : 65535));
      #1;
      upd = real'(y_pd) / 16384.0 * real'(kout_pd) / 256.0;
      upi = real'(ui) / 268435456.0 * real'(kout_pi) / 256.0;
      case (mode)
        MODE_P, MODE_PD: r = upd;
        MODE_PI:         r = upi;
        default:         r = upd + upi;
      endcase
      r = r * 2048.0;
      tol = (mode == MODE_PID) ? 2.01 : 1.01;   // one truncation per branch
      if (r > 32767.0)  begin r = 32767.0; sat++; end
      if (r < -32768.0) begin r = -32768.0; sat++; end
      seen[n % 4]++;
      checks++;
      if (real'(u) - r > tol || r - real'(u) > tol) begin
        failures++;
        $display("FAIL mode=%0d u=%0d exp=%f", mode, u, r);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
