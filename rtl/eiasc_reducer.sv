// eiasc_reducer: centre-of-sets type reducer using the Enhanced Iterative
// Algorithm with Stop Condition (EIASC).
//
// Inputs are, per consequent set k (0..m-1, consequent points y_k ascending),
// the summed lower and upper firing strengths w_lo[k], w_up[k]. The reducer
// finds the interval [yl, yr] of the type-reduced set:
//   INIT   m clocks:  a = sum y_k*w_lo[k], b = sum w_lo[k] (same start for both)
//   ITER   left and right searches in parallel, one switch point per clock.
//          Left:  L = 0,1,..  a_l += y_L*(w_up[L]-w_lo[L]), b_l likewise,
//                 stop when a_l/b_l <= y_{L+1} (yl has stopped decreasing)
//                 or L = m-2.
//          Right: R = m-1,m-2,..  a_r += y_R*(w_up[R]-w_lo[R]), b_r likewise,
//                 stop when a_r/b_r >= y_{R-1} (yr has stopped increasing)
//                 or R = 1.
//          The ratio tests are done as a <= y*b, so no division per step.
//   DIV    two sequential divisions give yl = a_l/b_l and yr = a_r/b_r (Q2.14).
// If a denominator is still zero at the end, yl falls back to y_{m-1} and yr to
// y_0 (only the outermost set fires). done pulses when yl, yr are valid, about
// 2m + 50 clocks after start. The EIASC search is the algorithm chosen for the
// controller; the fixed-point formats and the schedule are this design's.
module eiasc_reducer
  import it2flc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] m,
  input  wsum_t      w_lo [MAX_MF],
  input  wsum_t      w_up [MAX_MF],
  output uni_t       yl,
  output uni_t       yr,
  output logic       done
);
  typedef logic signed [ACC_W-1:0] acc_t;
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_ITER, S_DIV} state_e;

  state_e     state;
  logic [2:0] ms, k, lp, rp;
  acc_t       a_l, a_r, b_l, b_r;
  logic       l_done, r_done;

  // consequent points of the selected partition, Q2.14
  uni_t ytab [MIN_MF:MAX_MF][MAX_MF];
  for (genvar gm = MIN_MF; gm <= MAX_MF; gm++) begin : g_m
    for (genvar gi = 0; gi < MAX_MF; gi++) begin : g_i
      localparam int Y = hund_to_uni(cons_hund(gm, gi));
      assign ytab[gm][gi] = UNI_W'(Y);
    end
  end

  function automatic acc_t ymul(input uni_t pt, input acc_t w);
    return acc_t'(pt) * w;
  endfunction

  // next values of both searches in the current step
  acc_t dl, dr, na_l, nb_l, na_r, nb_r;
  logic stop_l, stop_r;
  always_comb begin
    dl   = acc_t'(w_up[lp]) - acc_t'(w_lo[lp]);
    dr   = acc_t'(w_up[rp]) - acc_t'(w_lo[rp]);
    na_l = a_l + ymul(ytab[ms][lp], dl);
    nb_l = b_l + dl;
    na_r = a_r + ymul(ytab[ms][rp], dr);
    nb_r = b_r + dr;
    stop_l = (lp == ms - 3'd2) ||
             (nb_l != '0 && na_l <= ymul(ytab[ms][lp + 3'd1], nb_l));
    stop_r = (rp == 3'd1) ||
             (nb_r != '0 && na_r >= ymul(ytab[ms][rp - 3'd1], nb_r));
  end

  // final divisions on magnitudes
  logic          div_start, dl_done, dr_done, dl_busy, dr_busy, got_l, got_r;
  logic [ACC_W-1:0] ql, qr;
  logic [ACC_W-1:0] num_l, num_r;
  logic [WSUM_W-1:0] den_l, den_r;
  always_comb begin
    num_l = a_l[ACC_W-1] ? ACC_W'(-a_l) : ACC_W'(a_l);
    num_r = a_r[ACC_W-1] ? ACC_W'(-a_r) : ACC_W'(a_r);
    den_l = WSUM_W'(b_l);
    den_r = WSUM_W'(b_r);
  end

  seq_divider #(.NW(ACC_W), .DW(WSUM_W)) u_div_l (
    .clk, .rst_n, .start(div_start), .dividend(num_l), .divisor(den_l),
    .quotient(ql), .busy(dl_busy), .done(dl_done));
  seq_divider #(.NW(ACC_W), .DW(WSUM_W)) u_div_r (
    .clk, .rst_n, .start(div_start), .dividend(num_r), .divisor(den_r),
    .quotient(qr), .busy(dr_busy), .done(dr_done));

  function automatic uni_t signed_q(input logic neg, input logic [ACC_W-1:0] q);
    logic [ACC_W-1:0] qs;
    qs = (q > ACC_W'(UNI_ONE)) ? ACC_W'(UNI_ONE) : q;
    return neg ? -UNI_W'(qs) : UNI_W'(qs);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ms <= 3'd2; k <= '0; lp <= '0; rp <= '0;
      a_l <= '0; a_r <= '0; b_l <= '0; b_r <= '0;
      l_done <= 1'b0; r_done <= 1'b0; div_start <= 1'b0;
      got_l <= 1'b0; got_r <= 1'b0;
      yl <= '0; yr <= '0; done <= 1'b0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          ms    <= mf_count(m);
          k     <= '0;
          a_l   <= '0;
          b_l   <= '0;
          state <= S_INIT;
        end
        S_INIT: begin
          a_l <= a_l + ymul(ytab[ms][k], acc_t'(w_lo[k]));
          b_l <= b_l + acc_t'(w_lo[k]);
          if (k == ms - 3'd1) begin
            a_r    <= a_l + ymul(ytab[ms][k], acc_t'(w_lo[k]));
            b_r    <= b_l + acc_t'(w_lo[k]);
            lp     <= '0;
            rp     <= ms - 3'd1;
            l_done <= 1'b0;
            r_done <= 1'b0;
            state  <= S_ITER;
          end else begin
            k <= k + 3'd1;
          end
        end
        S_ITER: begin
          if (!l_done) begin
            a_l <= na_l;
            b_l <= nb_l;
            if (stop_l) l_done <= 1'b1;
            else        lp <= lp + 3'd1;
          end
          if (!r_done) begin
            a_r <= na_r;
            b_r <= nb_r;
            if (stop_r) r_done <= 1'b1;
            else        rp <= rp - 3'd1;
          end
          if ((l_done || stop_l) && (r_done || stop_r)) begin
            div_start <= 1'b1;
            got_l     <= 1'b0;
            got_r     <= 1'b0;
            state     <= S_DIV;
          end
        end
        S_DIV: begin
          if (dl_done) begin
            yl    <= (b_l == '0) ? ytab[ms][ms - 3'd1] : signed_q(a_l[ACC_W-1], ql);
            got_l <= 1'b1;
          end
          if (dr_done) begin
            yr    <= (b_r == '0) ? ytab[ms][0] : signed_q(a_r[ACC_W-1], qr);
            got_r <= 1'b1;
          end
          if ((got_l || dl_done) && (got_r || dr_done)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the two searches never cross the partition
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_ITER) |-> (lp <= ms - 3'd2 && rp >= 3'd1 && rp < ms));
endmodule
