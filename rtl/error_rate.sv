// error_rate: error and rate of change of the error, once per sample.
//
// On start it latches e(k) = setpoint - actual (Q6.11, one bit wider than the
// I/O words so that no difference overflows) and starts a sequential division
// of e(k) - e(k-1) by Ts: de(k) = (e(k) - e(k-1)) / Ts, in Q21.11 and
// saturated to 32 bits. done pulses about 32 clocks after start, when e and de
// are valid; e(k) then becomes the stored e(k-1) for the next sample. e(k-1)
// is zero after reset. The equations follow the controller description; the
// sequential divider and the formats are this design's choices.
module error_rate
  import it2flc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  sig_t setpoint,
  input  sig_t actual,
  input  ts_t  ts,
  output logic signed [SIG_W:0]  e,
  output logic signed [DE_W-1:0] de,
  output logic done
);
  localparam int NW = SIG_W + 2 + TS_FRAC;   // |diff| << TS_FRAC

  logic signed [SIG_W:0]   e_prev;
  logic signed [SIG_W+1:0] diff;
  logic                    neg;
  logic [SIG_W+1:0]        mag;
  logic [NW-1:0]           quo;
  logic                    div_done, div_busy, div_start;
  logic [NW-1:0]           dividend;

  always_comb begin
    diff     = (SIG_W+2)'(e) - (SIG_W+2)'(e_prev);
    mag      = diff[SIG_W+1] ? -diff : diff;
    dividend = NW'(mag) << TS_FRAC;
  end

  seq_divider #(.NW(NW), .DW(TS_W)) u_div (
    .clk, .rst_n, .start(div_start), .dividend, .divisor(ts),
    .quotient(quo), .busy(div_busy), .done(div_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e <= '0; e_prev <= '0; de <= '0; done <= 1'b0; div_start <= 1'b0; neg <= 1'b0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      if (start && !div_busy && !div_start) begin
        e         <= (SIG_W+1)'(setpoint) - (SIG_W+1)'(actual);
        div_start <= 1'b1;
      end
      if (div_start) neg <= diff[SIG_W+1];
      if (div_done) begin
        if (quo > NW'({1'b0, {(DE_W-1){1'b1}}}))
          de <= neg ? {1'b1, {(DE_W-1){1'b0}}} + DE_W'(1) : {1'b0, {(DE_W-1){1'b1}}};
        else
          de <= neg ? -DE_W'(quo) : DE_W'(quo);
        e_prev <= e;
        done   <= 1'b1;
      end
    end
  end
endmodule
