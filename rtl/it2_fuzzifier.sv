// it2_fuzzifier: interval type-2 fuzzifier for one controller input.
//
// For a crisp input x in the Q2.14 universe it returns, for each of the m
// sets of the selected partition (m = 2..7, chosen by C3..C5), the upper and
// lower membership grades (Q1.15). Sets with index >= m read zero. The six
// partitions are built at elaboration from the trapezoid table of it2flc_pkg
// and the runtime m selects among them, which plays the part of the
// 2MF..7MF blocks and their selector in the original structure: one set of
// evaluators serves all partition sizes. Combinational.
module it2_fuzzifier
  import it2flc_pkg::*;
(
  input  uni_t       x,
  input  logic [2:0] m,
  output grade_t     up [MAX_MF],
  output grade_t     lo [MAX_MF]
);
  mf_t tbl_u [MIN_MF:MAX_MF][MAX_MF];
  mf_t tbl_l [MIN_MF:MAX_MF][MAX_MF];

  for (genvar gm = MIN_MF; gm <= MAX_MF; gm++) begin : g_m
    for (genvar gi = 0; gi < MAX_MF; gi++) begin : g_i
      localparam mf_t SHAPE_U = mf_shape(gm, gi, 1'b1);
      localparam mf_t SHAPE_L = mf_shape(gm, gi, 1'b0);
      assign tbl_u[gm][gi] = SHAPE_U;
      assign tbl_l[gm][gi] = SHAPE_L;
    end
  end

  logic [2:0] ms;
  always_comb begin
    ms = mf_count(m);
    for (int i = 0; i < MAX_MF; i++) begin
      if (i < int'(ms)) begin
        up[i] = mf_eval(x, tbl_u[ms][i]);
        lo[i] = mf_eval(x, tbl_l[ms][i]);
      end else begin
        up[i] = '0;
        lo[i] = '0;
      end
    end
  end
endmodule
