// booth_ppg: radix-4 Booth encoder and partial-product generator for one
// group of the multiplier B.
//
// The group is the three overlapping bits {b(2i+1), b(2i), b(2i-1)}. They
// select the multiple of the multiplicand A to add at weight 4^i:
//   000 +0   001 +A   010 +A   011 +2A
//   100 -2A  101 -A   110 -A   111 -0
// A negative multiple is produced the usual way: the selected magnitude
// is one's complemented here and `neg` asks the adder array to add one at
// the group's least significant bit. The negation is suppressed for a zero
// group, so both 000 and 111 give an all-zero row with neg = 0: the rows of
// a small number stay at zero whatever its sign, which is what keeps the
// switching activity low when B has a small dynamic range. `zero` flags
// those groups.
//
// Interface: purely combinational. `pp` is AW+1 bits wide (room for 2A) and
// is to be sign-extended by the user. The encoding table is the one of the
// modified Booth scheme; splitting a negative multiple into complement and
// +1, and producing -0 as a plain zero row, are this design's choices.
module booth_ppg #(
  parameter int AW = 32
) (
  input  logic signed [AW-1:0] a,
  input  logic        [2:0]    grp,
  output logic signed [AW:0]   pp,
  output logic                 neg,
  output logic                 zero
);
  logic one, two;
  logic signed [AW:0] mag;

  always_comb begin
    one  = grp[1] ^ grp[0];
    two  = (grp == 3'b011) || (grp == 3'b100);
    zero = !one && !two;
    neg  = grp[2] && !zero;
    if (one)      mag = {a[AW-1], a};
    else if (two) mag = {a, 1'b0};
    else          mag = '0;
    pp = neg ? ~mag : mag;
  end
endmodule
