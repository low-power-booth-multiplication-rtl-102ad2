// rnd_unbiased: unbiased rounding (round half to even) of a wide
// fixed-point value to a DW-bit word, with an optional divide-by-two.
//
// The input v carries FB fraction bits below the least significant bit of
// the output word. With scale = 0 the result is v / 2^FB, with scale = 1
// it is v / 2^(FB+1); in both cases rounded to the nearest integer, ties
// going to the even neighbour, so that the rounding error has zero mean
// over many butterflies. The result keeps the low DW bits (two's
// complement wrap-around when it does not fit).
//
// The divide-by-two lets the FFT scale its output by 1/sqrt(N) by halving
// at every second stage. Interface: combinational. Round half to even and
// the wrap-around are this design's reading of "unbiased rounding".
module rnd_unbiased #(
  parameter int DW = 32,
  parameter int FB = 30,
  parameter int IW = DW + 1 + FB
) (
  input  logic signed [IW-1:0] v,
  input  logic                 scale,
  output logic signed [DW-1:0] y
);
  logic signed [IW-1:0] q0, q1;
  logic                 up0, up1;

  always_comb begin
    // shift by FB: round bit v[FB-1], sticky bits below it
    q0  = v >>> FB;
    up0 = v[FB-1] && ((|v[FB-2:0]) || q0[0]);
    // shift by FB+1: round bit v[FB], sticky bits below it
    q1  = v >>> (FB + 1);
    up1 = v[FB] && ((|v[FB-1:0]) || q1[0]);
    if (scale) y = DW'(q1 + IW'(up1));
    else       y = DW'(q0 + IW'(up0));
  end
endmodule
