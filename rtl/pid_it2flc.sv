// pid_it2flc: P/PD/PI/PID-like interval type-2 fuzzy logic controller.
//
// Every sampling instant (sample_timer, period Ts) the controller
//   1. forms e(k) = setpoint - actual and de(k) = (e(k) - e(k-1)) / Ts
//      (error_rate, about 35 clocks);
//   2. scales both by the input gains and limits them to [-1, 1]
//      (input_scaler x4): PD branch kp_pd*e, kd_pd*de; PI branch kp_pi*e,
//      kd_pi*de;
//   3. runs the two fuzzy systems in parallel (it2flc_core x2, about 120
//      clocks with 7 sets);
//   4. integrates the PI branch output (pi_integrator, Ts/(z-1)) and applies
//      the output gains and the structure selection (output_mux);
//   5. updates control_signal and pulses sample_done.
// A PI-like controller is obtained from a second PD-like fuzzy system followed
// by an integrator, so a PID-like controller needs two 2-input rule tables
// instead of one 3-input table.
//
// Controls: {c1, c2} select P / PD / PI / PID (00 / 01 / 10 / 11); in P mode
// the PD branch's rate gain is forced to zero. {c3, c4, c5} give the number
// of membership functions, 2..7, for both inputs and the output (codes 0 and
// 1 select 2). Gains are unsigned Q8.8, Ts is unsigned Q11.14 seconds, the
// signal words are signed Q5.11. rst_n is the active-low push-button reset.
// A sampling tick that arrives while a computation is still running is
// ignored; at Ts >= 0.01 s and any practical clock this cannot happen.
module pid_it2flc
  import it2flc_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 64'd50_000_000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  sig_t  setpoint,
  input  sig_t  actual_output,
  input  ts_t   ts,
  input  gain_t kp_pi,
  input  gain_t kd_pi,
  input  gain_t kout_pi,
  input  gain_t kp_pd,
  input  gain_t kd_pd,
  input  gain_t kout_pd,
  input  logic  c1,
  input  logic  c2,
  input  logic  c3,
  input  logic  c4,
  input  logic  c5,
  output sig_t  control_signal,
  output logic  sample_done
);
  typedef enum logic [2:0] {T_IDLE, T_ERR, T_FIS, T_INT, T_OUT} tstate_e;

  tstate_e state;
  logic    tick, er_start, er_done, fis_start, pd_done, pi_done, got_pd, got_pi;
  logic    int_update;
  mode_e   mode;
  logic [2:0] m;
  logic signed [SIG_W:0]  e;
  logic signed [DE_W-1:0] de;
  uni_t    x_pd1, x_pd2, x_pi1, x_pi2, y_pd, y_pi;
  uni_t    unused_pd_yl, unused_pd_yr, unused_pi_yl, unused_pi_yr;
  gain_t   kd_pd_eff;
  logic signed [INT_W-1:0] ui;
  sig_t    u;

  assign mode      = mode_e'({c1, c2});
  assign m         = mf_count({c3, c4, c5});
  assign kd_pd_eff = (mode == MODE_P) ? '0 : kd_pd;

  sample_timer #(.CLK_HZ(CLK_HZ)) u_timer (.clk, .rst_n, .ts, .tick);

  error_rate u_err (
    .clk, .rst_n, .start(er_start), .setpoint, .actual(actual_output), .ts,
    .e, .de, .done(er_done));

  input_scaler #(.XW(SIG_W+1), .XF(SIG_FRAC)) u_s_pd1 (.x(e),  .gain(kp_pd),     .y(x_pd1));
  input_scaler #(.XW(DE_W),    .XF(SIG_FRAC)) u_s_pd2 (.x(de), .gain(kd_pd_eff), .y(x_pd2));
  input_scaler #(.XW(SIG_W+1), .XF(SIG_FRAC)) u_s_pi1 (.x(e),  .gain(kp_pi),     .y(x_pi1));
  input_scaler #(.XW(DE_W),    .XF(SIG_FRAC)) u_s_pi2 (.x(de), .gain(kd_pi),     .y(x_pi2));

  it2flc_core u_pd (
    .clk, .rst_n, .start(fis_start), .x1(x_pd1), .x2(x_pd2), .m,
    .y(y_pd), .done(pd_done), .yl(unused_pd_yl), .yr(unused_pd_yr));
  it2flc_core u_pi (
    .clk, .rst_n, .start(fis_start), .x1(x_pi1), .x2(x_pi2), .m,
    .y(y_pi), .done(pi_done), .yl(unused_pi_yl), .yr(unused_pi_yr));

  pi_integrator u_int (
    .clk, .rst_n, .update(int_update), .enable(mode == MODE_PI || mode == MODE_PID),
    .du(y_pi), .ts, .ui);

  output_mux u_mux (
    .mode, .y_pd, .ui, .kout_pd, .kout_pi, .u);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE; er_start <= 1'b0; fis_start <= 1'b0; int_update <= 1'b0;
      got_pd <= 1'b0; got_pi <= 1'b0; control_signal <= '0; sample_done <= 1'b0;
    end else begin
      er_start    <= 1'b0;
      fis_start   <= 1'b0;
      int_update  <= 1'b0;
      sample_done <= 1'b0;
      case (state)
        T_IDLE: if (tick) begin
          er_start <= 1'b1;
          state    <= T_ERR;
        end
        T_ERR: if (er_done) begin
          fis_start <= 1'b1;
          got_pd    <= 1'b0;
          got_pi    <= 1'b0;
          state     <= T_FIS;
        end
        T_FIS: begin
          if (pd_done) got_pd <= 1'b1;
          if (pi_done) got_pi <= 1'b1;
          if ((got_pd || pd_done) && (got_pi || pi_done)) begin
            int_update <= 1'b1;
            state      <= T_INT;
          end
        end
        T_INT: state <= T_OUT;   // integrator takes the new increment
        T_OUT: begin
          control_signal <= u;
          sample_done    <= 1'b1;
          state          <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
