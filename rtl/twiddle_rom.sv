// twiddle_rom: table of the twiddle factors W_N^k = exp(-i*2*pi*k/N),
// k = 0 .. N/2-1, N = 2^LOG2N, in Q2.30.
//
//   tw_re[k] = round( cos(2*pi*k/N) * 2^FRAC)
//   tw_im[k] = round(-sin(2*pi*k/N) * 2^FRAC)
//
// The table is computed by a constant function when the design is
// elaborated, so no data file is needed; synthesis turns it into a ROM.
// A smaller FFT of size N' = N/2^m uses entry k*2^m of the same table.
//
// Timing: synchronous read, tw_* are valid one clock after addr. The table
// size (N/2 entries for the 1024-point FFT) and the Q2.30 format follow the
// evaluated FFT; rounding to nearest is this design's choice.
module twiddle_rom #(
  parameter int LOG2N = 10,
  parameter int DW    = 32,
  parameter int FRAC  = 30
) (
  input  logic                 clk,
  input  logic [LOG2N-2:0]     addr,
  output logic signed [DW-1:0] tw_re,
  output logic signed [DW-1:0] tw_im
);
  localparam int  NH = 2 ** (LOG2N - 1);
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [2*DW-1:0] tab_t [NH];

  function automatic tab_t make_table();
    tab_t t;
    real  ang;
    for (int k = 0; k < NH; k++) begin
      ang  = 2.0 * PI * real'(k) / real'(2 * NH);
      t[k] = {DW'(longint'($floor( $cos(ang) * (2.0 ** FRAC) + 0.5))),
              DW'(longint'($floor(-$sin(ang) * (2.0 ** FRAC) + 0.5)))};
    end
    return t;
  endfunction

  localparam tab_t TABLE = make_table();

  always_ff @(posedge clk) begin
    tw_re <= TABLE[addr][2*DW-1:DW];
    tw_im <= TABLE[addr][DW-1:0];
  end
endmodule
