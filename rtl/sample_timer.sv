// sample_timer: sampling-instant generator.
//
// The user sets the sampling time Ts in seconds (unsigned Q11.14, so 0.01 s
// to 1024 s and beyond are representable). The period in clock cycles is
// floor(Ts * CLK_HZ / 2^14), recomputed continuously so that a new Ts takes
// effect at the next tick. A free-running counter raises tick for one clock
// every period; a period below one clock gives a tick every clock. The first
// tick comes one period after reset. The clock frequency (50 MHz, the DE2
// board oscillator) and the counting scheme are this design's choices.
module sample_timer
  import it2flc_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 64'd50_000_000
) (
  input  logic clk,
  input  logic rst_n,
  input  ts_t  ts,
  output logic tick
);
  localparam int PW = TS_W + 40;
  localparam int CW = PW - TS_FRAC;

  logic [PW-1:0] prod;
  logic [CW-1:0] period, cnt;

  always_comb begin
    prod   = PW'(ts) * PW'(CLK_HZ);
    period = prod[PW-1:TS_FRAC];
    if (period == '0) period = CW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt + CW'(1) >= period) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + CW'(1);
      tick <= 1'b0;
    end
  end
endmodule
