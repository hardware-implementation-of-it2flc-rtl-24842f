// inference_engine: rule base and firing-interval computation of one fuzzy
// system.
//
// After start the engine visits the m x m rules (i over the sets of input 1,
// j over the sets of input 2) one per clock. Rule (i, j) fires with the
// interval [lo1[i] * lo2[j], up1[i] * up2[j]] (product t-norm, Q1.15) and
// its consequent set is rule_out(m, i, j) from the rule table of it2flc_pkg.
// The lower and upper bounds are summed per consequent set into w_lo / w_up.
// Because all rules that share a consequent share its crisp point, these sums
// give the same centre-of-sets result as treating every rule on its own.
// Timing: done pulses m*m + 1 clocks after start; grades must stay stable
// until then. The product t-norm follows the firing-interval formula of the
// controller; the rule-serial schedule and the per-set sums are this design's.
module inference_engine
  import it2flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] m,
  input  grade_t     up1 [MAX_MF],
  input  grade_t     lo1 [MAX_MF],
  input  grade_t     up2 [MAX_MF],
  input  grade_t     lo2 [MAX_MF],
  output wsum_t      w_lo [MAX_MF],
  output wsum_t      w_up [MAX_MF],
  output logic       done
);
  logic [2:0] ms, i, j, o;
  logic       busy;
  logic [2*GRADE_W-1:0] p_lo, p_up;
  grade_t     f_lo, f_up;

  always_comb begin
    p_lo = lo1[i] * lo2[j];
    p_up = up1[i] * up2[j];
    f_lo = GRADE_W'(p_lo >> GRADE_FRAC);
    f_up = GRADE_W'(p_up >> GRADE_FRAC);
    o    = rule_out(ms, i, j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms <= 3'd2; i <= '0; j <= '0; busy <= 1'b0; done <= 1'b0;
      for (int k = 0; k < MAX_MF; k++) begin
        w_lo[k] <= '0;
        w_up[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        ms   <= mf_count(m);
        i    <= '0;
        j    <= '0;
        busy <= 1'b1;
        for (int k = 0; k < MAX_MF; k++) begin
          w_lo[k] <= '0;
          w_up[k] <= '0;
        end
      end else if (busy) begin
        w_lo[o] <= w_lo[o] + WSUM_W'(f_lo);
        w_up[o] <= w_up[o] + WSUM_W'(f_up);
        if (j == ms - 3'd1) begin
          j <= '0;
          if (i == ms - 3'd1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            i <= i + 3'd1;
          end
        end else begin
          j <= j + 3'd1;
        end
      end
    end
  end

  // the rule walk never leaves the selected partition
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> (i < ms && j < ms));
endmodule
