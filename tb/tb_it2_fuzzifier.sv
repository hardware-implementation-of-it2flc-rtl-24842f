// tb_it2_fuzzifier: sweeps the input over [-1, 1] for every partition size
// and compares each upper and lower grade with a floating-point evaluation of
// the breakpoint table (tolerance 8 LSB of Q1.15 for breakpoint rounding).
// Also checks hand-worked grades of the 2-set partition, that unused sets
// read zero, and that no lower grade exceeds its upper grade.
module tb_it2_fuzzifier;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  uni_t       x;
  logic [2:0] m;
  grade_t     up [MAX_MF], lo [MAX_MF];
  int checks = 0, failures = 0;

  it2_fuzzifier dut (.x, .m, .up, .lo);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input real got, input real exp_v, input real tol, input string what);
    checks++;
    if (got - exp_v > tol || exp_v - got > tol) begin
      failures++;
      $display("FAIL %s m=%0d x=%f got %f exp %f", what, m, real'(x) / 16384.0, got, exp_v);
    end
  endtask

  initial begin
    real xr;
    for (int mm = 2; mm <= 7; mm++) begin
      m = 3'(mm);
      for (int xi = -16384; xi <= 16384; xi += 37) begin
        x = uni_t'(xi);
        #1;
        xr = xi / 16384.0;
        for (int i = 0; i < MAX_MF; i++) begin
          if (i < mm) begin
            near(up[i] / 32768.0, mf_real(mm, i, 1'b1, xr), 8.0 / 32768.0, "upper");
            near(lo[i] / 32768.0, mf_real(mm, i, 1'b0, xr), 8.0 / 32768.0, "lower");
            checks++;
            if (lo[i] > up[i]) begin failures++; $display("FAIL lo>up m=%0d i=%0d", mm, i); end
          end else begin
            checks++;
            if (up[i] != 0 || lo[i] != 0) begin failures++; $display("FAIL unused set %0d", i); end
          end
        end
      end
    end
    // 2-set partition, worked by hand: N upper is 1 up to -0.35 then falls to 0 at 1
    m = 3'd2; x = 16'sd0; #1;
    near(up[0] / 32768.0, 1.0 / 1.35, 2.0e-4, "N upper at 0");
    near(lo[0] / 32768.0, 0.35 / 1.35, 2.0e-4, "N lower at 0");
    near(up[1] / 32768.0, 1.0 / 1.35, 2.0e-4, "P upper at 0");
    x = -16'sd16384; #1;
    near(up[0] / 32768.0, 1.0, 1.0e-6, "N upper at -1");
    near(lo[0] / 32768.0, 1.0, 1.0e-6, "N lower at -1");
    near(up[1] / 32768.0, 0.0, 1.0e-6, "P upper at -1");
    // codes 0 and 1 select two sets
    m = 3'd0; x = 16'sd0; #1;
    near(up[1] / 32768.0, 1.0 / 1.35, 2.0e-4, "code 0 selects 2 sets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
