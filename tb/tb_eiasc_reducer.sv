// tb_eiasc_reducer: random firing-strength sums per consequent set; yl and yr
// must match an exhaustive search over all switch points of the
// centre-of-sets formulas (floating point) within 2 LSB of Q2.14. Counts how
// often each search stops early (before the last switch point) and requires
// both early and full-length searches to occur.
module tb_eiasc_reducer;
  import it2flc_pkg::*;
  import it2_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [2:0] m;
  wsum_t w_lo [MAX_MF], w_up [MAX_MF];
  uni_t  yl, yr;
  int checks = 0, failures = 0, early = 0, full = 0;

  eiasc_reducer dut (.clk, .rst_n, .start, .m, .w_lo, .w_up, .yl, .yr, .done);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count early stops of the left search
  always @(posedge clk)
    if (dut.state == dut.S_ITER && !dut.l_done && dut.stop_l) begin
      if (dut.lp < dut.ms - 3'd2) early++; else full++;
    end

  initial begin
    real ys[], flo[], fup[], eyl, eyr;
    int mm, lat;
    m = 3'd2;
    for (int i = 0; i < MAX_MF; i++) begin w_lo[i] = 0; w_up[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      mm = 2 + (n % 6);
      m  = 3'(mm);
      ys = new[mm]; flo = new[mm]; fup = new[mm];
      for (int k = 0; k < MAX_MF; k++) begin
        w_up[k] = wsum_t'($urandom_range(0, (n % 3 == 0) ? 40000 : 200000));
        w_lo[k] = wsum_t'($urandom_range(0, int'(w_up[k])));
        if (n % 7 == 0 && k != mm / 2) begin w_lo[k] = 0; w_up[k] = (k % 2) ? 0 : w_up[k]; end
      end
      for (int k = 0; k < mm; k++) begin
        ys[k] = cons_ref(mm, k); flo[k] = real'(w_lo[k]); fup[k] = real'(w_up[k]);
      end
      cos_exhaustive(mm, ys, flo, fup, eyl, eyr);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks += 3;
      if (eyl < 1.0e8 && (real'(yl) / 16384.0 - eyl > 2.0 / 16384 || eyl - real'(yl) / 16384.0 > 2.0 / 16384)) begin
        failures++; $display("FAIL m=%0d yl=%f exp %f", mm, real'(yl) / 16384.0, eyl);
      end
      if (eyr > -1.0e8 && (real'(yr) / 16384.0 - eyr > 2.0 / 16384 || eyr - real'(yr) / 16384.0 > 2.0 / 16384)) begin
        failures++; $display("FAIL m=%0d yr=%f exp %f", mm, real'(yr) / 16384.0, eyr);
      end
      if (lat > 2 * mm + 55) begin failures++; $display("FAIL latency %0d", lat); end
    end
    checks += 2;
    if (early == 0) begin failures++; $display("FAIL no early stop"); end
    if (full == 0)  begin failures++; $display("FAIL no full-length search"); end
    $display("early stops %0d, full searches %0d", early, full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
