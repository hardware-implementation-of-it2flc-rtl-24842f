// tb_defuzzifier: the crisp output must be floor((yl + yr) / 2) for random
// and extreme interval end points.
module tb_defuzzifier;
  import it2flc_pkg::*;
  uni_t yl, yr, y;
  int checks = 0, failures = 0;

  defuzzifier dut (.yl, .yr, .y);

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int n = 0; n < 1000; n++) begin
      if (n < 4) begin
        yl = (n[0]) ? 16'sh7fff : 16'sh8000;
        yr = (n[1]) ? 16'sh7fff : 16'sh8000;
      end else begin
        yl = uni_t'($urandom);
        yr = uni_t'($urandom);
      end
      #1;
      s = int'($floor((real'(yl) + real'(yr)) / 2.0));
      checks++;
      if (int'(y) != s) begin
        failures++;
        $display("FAIL yl=%0d yr=%0d y=%0d exp=%0d", yl, yr, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
