// defuzzifier: crisp output of the interval type-2 fuzzy system.
//
// The type-reduced set is the interval [yl, yr]; the crisp output is its
// midpoint y = (yl + yr) / 2, formed with one extra bit so that the sum cannot
// overflow and rounded toward minus infinity by the final shift.
// Combinational, Q2.14 in and out. Midpoint defuzzification is the controller
// description's; the rounding is this design's.
module defuzzifier
  import it2flc_pkg::*;
(
  input  uni_t yl,
  input  uni_t yr,
  output uni_t y
);
  logic signed [UNI_W:0] sum;
  always_comb begin
    sum = (UNI_W+1)'(yl) + (UNI_W+1)'(yr);
    y   = UNI_W'(sum >>> 1);
  end
endmodule
