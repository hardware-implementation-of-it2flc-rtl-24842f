// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start loads dividend and divisor; NW clocks later done pulses
// for one cycle with quotient = dividend / divisor (truncated). busy is high
// in between. A zero divisor gives an all-ones quotient (saturation). Used for
// the division by Ts in the error-rate unit and for the two final divisions
// of the type reducer; the division method is this design's choice.
module seq_divider #(
  parameter int NW = 32,   // dividend and quotient width
  parameter int DW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [NW-1:0] quotient,
  output logic          busy,
  output logic          done
);
  logic [NW-1:0]   q;
  logic [DW:0]     rem;
  logic [DW-1:0]   dvs;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]     trial;

  always_comb trial = {rem[DW-1:0], q[NW-1]} - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; dvs <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q    <= dividend;
        rem  <= '0;
        dvs  <= divisor;
        cnt  <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-1:0], q[NW-1]};
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient <= (dvs == '0) ? '1 : {q[NW-2:0], !trial[DW]};
        end
      end
    end
  end
endmodule
