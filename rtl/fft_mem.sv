// fft_mem: in-place sample memory of the sequential FFT.
//
// 2^LOG2N words of W bits (a complex sample, real part in the upper half).
// Two synchronous read ports deliver a butterfly's two operands one clock
// after their addresses; two write ports store its two results in the same
// cycle. If both write ports address the same word, port 1 wins (the FFT
// never does this). A read of a word written on the same clock edge returns
// the old contents.
//
// The memory organisation (one word per complex sample, 2 read + 2 write
// ports so that one butterfly completes per clock) is this design's choice.
module fft_mem #(
  parameter int LOG2N = 10,
  parameter int W     = 64
) (
  input  logic             clk,
  input  logic [LOG2N-1:0] ra0,
  input  logic [LOG2N-1:0] ra1,
  output logic [W-1:0]     rd0,
  output logic [W-1:0]     rd1,
  input  logic             we0,
  input  logic [LOG2N-1:0] wa0,
  input  logic [W-1:0]     wd0,
  input  logic             we1,
  input  logic [LOG2N-1:0] wa1,
  input  logic [W-1:0]     wd1
);
  logic [W-1:0] mem [2**LOG2N];

  always_ff @(posedge clk) begin
    rd0 <= mem[ra0];
    rd1 <= mem[ra1];
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
  end
endmodule
