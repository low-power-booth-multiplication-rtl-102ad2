// r2_butterfly: radix-2 FFT butterfly with statically swapped Booth
// multiplier inputs.
//
//   y0 = rnd(x0 + x1*W)      y1 = rnd(x0 - x1*W)
//
// x1*W is formed by cmul_tw: four Booth multipliers with the twiddle on the
// multiplicand and the data on the partial-product input, then a full
// 64-bit subtraction and addition (Q4.60). The final addition and
// subtraction are 32-bit: the integer part of the product at the Q2.30
// position (bits FRAC+DW-1..FRAC) meets x0 in a DW-bit adder with a carry
// out, while the product's FRAC lower bits pass alongside (for the
// subtraction they are negated and borrow one from the adder). rnd_unbiased
// then rounds each result back to Q2.30 with round half to even, and
// halves it as well when `scale` is set.
//
// Timing: the arithmetic is combinational and the four results are
// registered, so y* and out_valid follow x*, tw*, scale and in_valid by one
// clock. The output registers are this design's choice; the structure of
// multipliers, adders and rounding follows the butterfly this RTL is built
// after. Products whose magnitude reaches 2 wrap in the 32-bit adders, so
// the top two product bits are deliberately left unused.
module r2_butterfly #(
  parameter int DW   = 32,
  parameter int FRAC = 30
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 scale,
  input  logic signed [DW-1:0] x0_re,
  input  logic signed [DW-1:0] x0_im,
  input  logic signed [DW-1:0] x1_re,
  input  logic signed [DW-1:0] x1_im,
  input  logic signed [DW-1:0] tw_re,
  input  logic signed [DW-1:0] tw_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] y0_re,
  output logic signed [DW-1:0] y0_im,
  output logic signed [DW-1:0] y1_re,
  output logic signed [DW-1:0] y1_im
);
  localparam int IW = DW + 1 + FRAC;

  logic signed [2*DW-1:0] p_re, p_im;

  cmul_tw #(.DW(DW)) u_cmul (
    .tw_re (tw_re), .tw_im (tw_im),
    .x_re  (x1_re), .x_im  (x1_im),
    .p_re  (p_re),  .p_im  (p_im)
  );

  // split a product into its Q2.30 integer word and the bits below it
  logic signed [DW-1:0] hi_re, hi_im;
  logic [FRAC-1:0]      lo_re, lo_im;
  assign hi_re = p_re[FRAC+DW-1:FRAC];
  assign hi_im = p_im[FRAC+DW-1:FRAC];
  assign lo_re = p_re[FRAC-1:0];
  assign lo_im = p_im[FRAC-1:0];

  // 32-bit final adders/subtracters with carry out
  logic signed [DW:0] s0_re, s0_im, s1_re, s1_im;
  always_comb begin
    s0_re = (DW+1)'(x0_re) + (DW+1)'(hi_re);
    s0_im = (DW+1)'(x0_im) + (DW+1)'(hi_im);
    s1_re = (DW+1)'(x0_re) - (DW+1)'(hi_re) - (DW+1)'({1'b0, lo_re != '0});
    s1_im = (DW+1)'(x0_im) - (DW+1)'(hi_im) - (DW+1)'({1'b0, lo_im != '0});
  end

  // full results with FRAC extra fraction bits, then rounding
  logic signed [IW-1:0] v0_re, v0_im, v1_re, v1_im;
  assign v0_re = {s0_re, lo_re};
  assign v0_im = {s0_im, lo_im};
  assign v1_re = {s1_re, FRAC'(-lo_re)};
  assign v1_im = {s1_im, FRAC'(-lo_im)};

  logic signed [DW-1:0] r0_re, r0_im, r1_re, r1_im;
  rnd_unbiased #(.DW(DW), .FB(FRAC), .IW(IW)) u_rnd0r (.v(v0_re), .scale(scale), .y(r0_re));
  rnd_unbiased #(.DW(DW), .FB(FRAC), .IW(IW)) u_rnd0i (.v(v0_im), .scale(scale), .y(r0_im));
  rnd_unbiased #(.DW(DW), .FB(FRAC), .IW(IW)) u_rnd1r (.v(v1_re), .scale(scale), .y(r1_re));
  rnd_unbiased #(.DW(DW), .FB(FRAC), .IW(IW)) u_rnd1i (.v(v1_im), .scale(scale), .y(r1_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y0_re <= '0; y0_im <= '0; y1_re <= '0; y1_im <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y0_re <= r0_re; y0_im <= r0_im;
        y1_re <= r1_re; y1_im <= r1_im;
      end
    end
  end
endmodule
