// pi_integrator: discrete-time integrator of the PI-like branch.
//
// The PI-like fuzzy system delivers the increment du(k) of the control signal;
// this block accumulates it with the forward-Euler integrator Ts/(z-1):
//   ui(k) = ui(k-1) + Ts * du(k-1)
// On a one-clock update pulse (once per sample, while enable is high) the sum
// takes the increment stored at the previous update and stores the new one.
// With enable low the state holds, so the integral does not wind up while the
// PI branch is not selected. ui is Q12.28 (40 bits) and saturates at its
// limits. The Ts/(z-1) form is the controller's; hold and saturation are this
// design's choices.
module pi_integrator
  import it2flc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic update,
  input  logic enable,
  input  uni_t du,
  input  ts_t  ts,
  output logic signed [INT_W-1:0] ui
);
  localparam logic signed [INT_W:0] MAXV = (INT_W+1)'({1'b0, {(INT_W-1){1'b1}}});
  localparam logic signed [INT_W:0] MINV = -MAXV;

  uni_t                   du_prev;
  logic signed [INT_W:0]  inc, nxt;

  always_comb begin
    inc = (INT_W+1)'(du_prev) * $signed({1'b0, ts});
    nxt = (INT_W+1)'(ui) + inc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ui      <= '0;
      du_prev <= '0;
    end else if (update && enable) begin
      if (nxt > MAXV)      ui <= INT_W'(MAXV);
      else if (nxt < MINV) ui <= INT_W'(MINV);
      else                 ui <= INT_W'(nxt);
      du_prev <= du;
    end
  end
endmodule
