// tb_sample_timer: checks the sampling period of sample_timer for several Ts
// values against floor(Ts_raw * CLK_HZ / 2^14) cycles, including a Ts below
// one clock (a tick every clock) and a change of Ts between ticks.
module tb_sample_timer;
  import it2flc_pkg::*;
  localparam longint unsigned CLK = 64'd20_000;
  logic clk = 0, rst_n = 0;
  ts_t  ts;
  logic tick;
  int checks = 0, failures = 0;

  sample_timer #(.CLK_HZ(CLK)) dut (.clk, .rst_n, .ts, .tick);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input ts_t t);
    longint exp_p;
    int n, gap;
    ts = t;
    exp_p = (longint'(t) * longint'(CLK)) >>> TS_FRAC;
    if (exp_p == 0) exp_p = 1;
    // resynchronise on one tick, then measure three periods
    @(posedge clk iff tick);
    for (n = 0; n < 3; n++) begin
      gap = 0;
      do begin @(posedge clk); gap++; end while (!tick);
      checks++;
      if (gap != exp_p) begin
        failures++;
        $display("FAIL ts=%0d period %0d expected %0d", t, gap, exp_p);
      end
    end
  endtask

  initial begin
    ts = 25'd164;            // 0.01 s -> 200 clocks
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first tick one period after reset
    begin
      int c = 0;
      do begin @(posedge clk); c++; end while (!tick);
      checks++;
      if (c != ((164 * CLK) >> TS_FRAC)) begin
        failures++; $display("FAIL first tick after %0d", c);
      end
    end
    measure(25'd164);
    measure(25'd819);        // 0.05 s
    measure(25'd1);          // below one clock
    measure(25'd3);
    measure(25'd1638);       // 0.1 s
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
