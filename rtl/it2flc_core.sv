// it2flc_core: one two-input Mamdani interval type-2 fuzzy logic system
// (the "PD-like IT2FLC" box, used once as the PD branch and once as the PI
// branch of the controller).
//
// Chain: two it2_fuzzifier instances (combinational) -> inference_engine
// (rule walk, m*m clocks) -> eiasc_reducer (type reduction, about 2m + 50
// clocks) -> defuzzifier (midpoint). A pulse on start samples x1, x2 and m into
// registers, so the inputs may change afterwards; done pulses for one clock
// when y (Q2.14, within [-1, 1]) is valid, and y holds until the next done.
// Total latency is roughly m*m + 2m + 55 clocks (about 120 for m = 7).
module it2flc_core
  import it2flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  uni_t       x1,
  input  uni_t       x2,
  input  logic [2:0] m,
  output uni_t       y,
  output logic       done,
  output uni_t       yl,
  output uni_t       yr
);
  uni_t       x1_q, x2_q;
  logic [2:0] m_q;
  logic       inf_start;
  grade_t     up1 [MAX_MF], lo1 [MAX_MF], up2 [MAX_MF], lo2 [MAX_MF];
  wsum_t      w_lo [MAX_MF], w_up [MAX_MF];
  logic       inf_done, tr_done;
  uni_t       y_mid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1_q <= '0; x2_q <= '0; m_q <= 3'd2; inf_start <= 1'b0;
    end else begin
      inf_start <= start;
      if (start) begin
        x1_q <= x1;
        x2_q <= x2;
        m_q  <= mf_count(m);
      end
    end
  end

  it2_fuzzifier u_fz1 (.x(x1_q), .m(m_q), .up(up1), .lo(lo1));
  it2_fuzzifier u_fz2 (.x(x2_q), .m(m_q), .up(up2), .lo(lo2));

  inference_engine u_inf (
    .clk, .rst_n, .start(inf_start), .m(m_q),
    .up1, .lo1, .up2, .lo2, .w_lo, .w_up, .done(inf_done));

  eiasc_reducer u_tr (
    .clk, .rst_n, .start(inf_done), .m(m_q), .w_lo, .w_up,
    .yl, .yr, .done(tr_done));

  defuzzifier u_dfz (.yl, .yr, .y(y_mid));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      done <= 1'b0;
    end else begin
      done <= tr_done;
      if (tr_done) y <= y_mid;
    end
  end
endmodule
