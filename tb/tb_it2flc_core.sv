// tb_it2flc_core: random input pairs for every partition size; the crisp
// output and the type-reduced interval must match the floating-point
// reference (every rule fired on its own, exhaustive switch-point search)
// within 0.003, and done must come within m*m + 2m + 60 clocks.
module tb_it2flc_core;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  uni_t x1, x2, y, yl, yr;
  logic [2:0] m;
  int checks = 0, failures = 0;

  it2flc_core dut (.clk, .rst_n, .start, .x1, .x2, .m, .y, .done, .yl, .yr);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input real got, input real exp_v, input string what, input int mm);
    checks++;
    if (got - exp_v > 0.003 || exp_v - got > 0.003) begin
      failures++;
      $display("FAIL %s m=%0d x1=%f x2=%f got %f exp %f", what, mm, real'(x1) / 16384.0,
               real'(x2) / 16384.0, got, exp_v);
    end
  endtask

  initial begin
    real ryl, ryr, ry;
    int mm, lat;
    m = 3'd2; x1 = 0; x2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      mm = 2 + (n % 6);
      m  = 3'(mm);
      x1 = uni_t'($urandom_range(0, 32768) - 16384);
      x2 = uni_t'($urandom_range(0, 32768) - 16384);
      if (n < 6) begin x1 = 0; x2 = 0; end
      fis_ref(mm, real'(x1) / 16384.0, real'(x2) / 16384.0, ryl, ryr, ry);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      x1 = 0; x2 = 0;   // inputs are sampled at start
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      near(real'(y) / 16384.0, ry, "y", mm);
      near(real'(yl) / 16384.0, ryl, "yl", mm);
      near(real'(yr) / 16384.0, ryr, "yr", mm);
      checks++;
      if (lat > mm * mm + 2 * mm + 60) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
