// tb_error_rate: drives random set points, plant outputs and sampling times
// and checks e(k) = sp - y and de(k) = trunc((e(k) - e(k-1)) * 2^14 / Ts_raw)
// against integer arithmetic in the testbench, plus the latency to done.
module tb_error_rate;
  import it2flc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  sig_t sp, act;
  ts_t  ts;
  logic signed [SIG_W:0]  e;
  logic signed [DE_W-1:0] de;
  int checks = 0, failures = 0;
  longint e_prev = 0;

  error_rate dut (.clk, .rst_n, .start, .setpoint(sp), .actual(act), .ts, .e, .de, .done);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ee, q, mag;
    int lat;
    sp = '0; act = '0; ts = 25'd164;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      sp  = sig_t'($urandom);
      act = sig_t'($urandom);
      case (n % 4)
        0: ts = 25'd164;
        1: ts = 25'd16384;
        2: ts = ts_t'($urandom_range(1, 2000));
        default: ts = ts_t'($urandom_range(1, 33554431));
      endcase
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      ee  = longint'(sp) - longint'(act);
      mag = (ee - e_prev < 0) ? -(ee - e_prev) : (ee - e_prev);
      q   = (mag << 14) / longint'(ts);
      if (q > 64'h7fff_ffff) q = 64'h7fff_ffff;
      if (ee - e_prev < 0) q = -q;
      checks += 3;
      if (longint'(e) != ee) begin failures++; $display("FAIL e %0d exp %0d", e, ee); end
      if (longint'(de) != q) begin failures++; $display("FAIL de %0d exp %0d (ts %0d)", de, q, ts); end
      if (lat > 40) begin failures++; $display("FAIL latency %0d", lat); end
      e_prev = ee;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
