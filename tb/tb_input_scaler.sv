// tb_input_scaler: random inputs and gains; the scaled value must equal
// floor(x * gain / 2^5) limited to [-16384, 16384] (Q2.14 of [-1, 1]), worked
// out with real arithmetic in the testbench.
module tb_input_scaler;
  import it2flc_pkg::*;
  logic signed [31:0] x;
  gain_t gain;
  uni_t  y;
  int checks = 0, failures = 0, sat = 0;

  input_scaler #(.XW(32), .XF(11)) dut (.x, .gain, .y);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    int exp_y;
    for (int n = 0; n < 2000; n++) begin
      x    = (n % 3 == 0) ? 32'($signed($urandom)) : 32'($signed($urandom_range(0, 8191)) - 4096);
      gain = gain_t'($urandom_range(0, (n % 2) ? 65535 : 1024));
      #1;
      r = $floor((real'(x) / 2048.0) * (real'(gain) / 256.0) * 16384.0);
      if (r > 16384.0) begin r = 16384.0; sat++; end
      if (r < -16384.0) begin r = -16384.0; sat++; end
      exp_y = int'(r);
      checks++;
      if (int'(y) != exp_y) begin
        failures++;
        $display("FAIL x=%0d g=%0d y=%0d exp=%0d", x, gain, y, exp_y);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("FAIL limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
