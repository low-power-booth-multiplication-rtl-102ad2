// cmul_tw: complex multiplier x * W built from four Booth multipliers, with
// the operands statically assigned for low power.
//
//   p_re = x_re*tw_re - x_im*tw_im
//   p_im = x_re*tw_im + x_im*tw_re
//
// Every twiddle component goes to a multiplier's multiplicand input A and
// every data component to its partial-product generating input B. In a
// radar FFT most data values (and most intermediate values) are small, so
// their Booth groups are mostly 000 or 111 and generate zero partial
// products; twiddle factors are full-range numbers and would not. Swapping
// costs nothing: the hardware and the result are the same as with the
// operands the other way round.
//
// The subtraction and addition work on the full 2*DW-bit products
// (Q4.60 for Q2.30 operands). Interface: combinational.
module cmul_tw #(
  parameter int DW = 32
) (
  input  logic signed [DW-1:0]   tw_re,
  input  logic signed [DW-1:0]   tw_im,
  input  logic signed [DW-1:0]   x_re,
  input  logic signed [DW-1:0]   x_im,
  output logic signed [2*DW-1:0] p_re,
  output logic signed [2*DW-1:0] p_im
);
  logic signed [2*DW-1:0] rr, ii, ri, ir;

  booth_mult #(.AW(DW), .BW(DW)) u_rr (.a(tw_re), .b(x_re), .p(rr));
  booth_mult #(.AW(DW), .BW(DW)) u_ii (.a(tw_im), .b(x_im), .p(ii));
  booth_mult #(.AW(DW), .BW(DW)) u_ri (.a(tw_im), .b(x_re), .p(ri));
  booth_mult #(.AW(DW), .BW(DW)) u_ir (.a(tw_re), .b(x_im), .p(ir));

  assign p_re = rr - ii;
  assign p_im = ri + ir;
endmodule
