// input_scaler: gain block in front of a fuzzy input.
//
// Multiplies a signed signal x (XW bits, XF fraction bits) by an unsigned
// Q8.8 gain and returns the product in the Q2.14 universe of discourse,
// limited to [-1, 1] so that inputs beyond the universe fall on the outer
// (shoulder) sets. Combinational; the limiting is this design's reading of
// the [-1, 1] universe of the controller inputs.
module input_scaler
  import it2flc_pkg::*;
#(
  parameter int XW = 32,
  parameter int XF = 11
) (
  input  logic signed [XW-1:0] x,
  input  gain_t                gain,
  output uni_t                 y
);
  localparam int PW = XW + GAIN_W + 1;
  localparam int SH = XF + GAIN_FRAC - UNI_FRAC;   // must be >= 0

  logic signed [PW-1:0] prod, scaled;

  always_comb begin
    prod   = PW'(x) * $signed({1'b0, gain});
    scaled = prod >>> SH;
    if (scaled > PW'(UNI_ONE))       y = UNI_ONE;
    else if (scaled < PW'(UNI_MONE)) y = UNI_MONE;
    else                             y = UNI_W'(scaled);
  end
endmodule
