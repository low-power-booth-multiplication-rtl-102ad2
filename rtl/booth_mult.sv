// booth_mult: signed radix-4 modified Booth multiplier, p = a * b.
//
// The multiplier b is cut into overlapping groups of three bits; group i is
// {b(2i+1), b(2i), b(2i-1)} with b(-1) = 0, and if the last group runs past
// the top of b it is filled with b's sign. Each group drives one booth_ppg,
// which selects 0, +-A or +-2A. The partial products are sign-extended,
// shifted by 2i, and summed together with the +1 correction of every
// negative group. Because the first group's low bit is 0 it can never
// select +2A.
//
// Power depends on which operand feeds b: runs of equal bits in b give zero
// partial products. The FFT connects its (mostly small) data to b and the
// twiddle factors to a.
//
// Interface: combinational, AW x BW bits to AW+BW bits, two's complement.
// The partial products are added with a plain adder chain; the regular
// partial-product array that a production multiplier would use for the
// reduction is left to synthesis.
module booth_mult #(
  parameter int AW = 32,
  parameter int BW = 32
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int NG = (BW + 1) / 2;     // number of partial products
  localparam int PW = AW + BW;

  // b with the implicit 0 below bit 0 and sign extension on top
  logic [2*NG:0] bx;
  assign bx = {{(2*NG-BW){b[BW-1]}}, b, 1'b0};

  logic signed [AW:0] pp   [NG];
  logic               neg  [NG];

  for (genvar i = 0; i < NG; i++) begin : g_ppg
    booth_ppg #(.AW(AW)) u_ppg (
      .a    (a),
      .grp  (bx[2*i +: 3]),
      .pp   (pp[i]),
      .neg  (neg[i]),
      .zero ()
    );
  end

  always_comb begin
    logic signed [PW-1:0] acc;
    acc = '0;
    for (int i = 0; i < NG; i++) begin
      acc = acc + ((PW'(pp[i]) + PW'({1'b0, neg[i]})) <<< (2 * i));
    end
    p = acc;
  end
endmodule
