// tb_inference_engine: random grades for every partition size; the per-set
// sums of the rule firing bounds must equal those worked out in the testbench
// (products truncated to Q1.15, consequent from the reference rule), and done
// must come m*m + 1 clocks after start.
module tb_inference_engine;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [2:0] m;
  grade_t up1 [MAX_MF], lo1 [MAX_MF], up2 [MAX_MF], lo2 [MAX_MF];
  wsum_t  w_lo [MAX_MF], w_up [MAX_MF];
  int checks = 0, failures = 0;

  inference_engine dut (.clk, .rst_n, .start, .m, .up1, .lo1, .up2, .lo2, .w_lo, .w_up, .done);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint elo [MAX_MF], eup [MAX_MF];
    int lat, mm, o;
    m = 3'd2;
    for (int i = 0; i < MAX_MF; i++) begin up1[i] = 0; lo1[i] = 0; up2[i] = 0; lo2[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      mm = 2 + (n % 6);
      m  = 3'(mm);
      for (int i = 0; i < MAX_MF; i++) begin
        up1[i] = grade_t'($urandom_range(0, 32768));
        lo1[i] = grade_t'($urandom_range(0, int'(up1[i])));
        up2[i] = grade_t'($urandom_range(0, 32768));
        lo2[i] = grade_t'($urandom_range(0, int'(up2[i])));
        if (n % 10 == 0) begin up1[i] = 32768; lo1[i] = 32768; up2[i] = 32768; lo2[i] = 32768; end
      end
      for (int k = 0; k < MAX_MF; k++) begin elo[k] = 0; eup[k] = 0; end
      for (int i = 0; i < mm; i++)
        for (int j = 0; j < mm; j++) begin
          o = rule_ref(i, j);
          elo[o] += (longint'(lo1[i]) * longint'(lo2[j])) >> 15;
          eup[o] += (longint'(up1[i]) * longint'(up2[j])) >> 15;
        end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      for (int k = 0; k < MAX_MF; k++) begin
        checks += 2;
        if (longint'(w_lo[k]) != elo[k]) begin failures++; $display("FAIL m=%0d w_lo[%0d]=%0d exp %0d", mm, k, w_lo[k], elo[k]); end
        if (longint'(w_up[k]) != eup[k]) begin failures++; $display("FAIL m=%0d w_up[%0d]=%0d exp %0d", mm, k, w_up[k], eup[k]); end
      end
      checks++;
      if (lat != mm * mm + 1) begin failures++; $display("FAIL latency %0d for m=%0d", lat, mm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
