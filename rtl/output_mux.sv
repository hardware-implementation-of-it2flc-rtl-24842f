// output_mux: output gains and structure selection.
//
// u_pd = kout_pd * y_pd (PD-like branch) and u_pi = kout_pi * ui (integrated
// PI-like branch) are brought to the Q5.11 I/O format; {C1, C2} then select
//   00 P    u_pd (the top forces the PD branch's rate gain to zero)
//   01 PD   u_pd
//   10 PI   u_pi
//   11 PID  u_pd + u_pi
// and the result saturates to the 16-bit control word. Combinational. The
// four structures and the summing of the two branches are the controller's;
// the code assignment of C1, C2 is this design's choice.
module output_mux
  import it2flc_pkg::*;
(
  input  mode_e                   mode,
  input  uni_t                    y_pd,
  input  logic signed [INT_W-1:0] ui,
  input  gain_t                   kout_pd,
  input  gain_t                   kout_pi,
  output sig_t                    u
);
  localparam int PW = INT_W + GAIN_W + 2;
  localparam logic signed [PW-1:0] SMAX = PW'(32767);
  localparam logic signed [PW-1:0] SMIN = -PW'(32768);

  logic signed [PW-1:0] p_pd, p_pi, u_pd, u_pi, sum;

  always_comb begin
    p_pd = PW'(y_pd) * $signed({1'b0, kout_pd});
    p_pi = PW'(ui)   * $signed({1'b0, kout_pi});
    u_pd = p_pd >>> (UNI_FRAC + GAIN_FRAC - SIG_FRAC);
    u_pi = p_pi >>> (INT_FRAC + GAIN_FRAC - SIG_FRAC);
    unique case (mode)
      MODE_P, MODE_PD: sum = u_pd;
      MODE_PI:         sum = u_pi;
      default:         sum = u_pd + u_pi;
    endcase
    if (sum > SMAX)      u = sig_t'(SMAX);
    else if (sum < SMIN) u = sig_t'(SMIN);
    else                 u = sig_t'(sum);
  end
endmodule
