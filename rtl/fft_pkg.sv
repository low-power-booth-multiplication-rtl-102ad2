// fft_pkg: shared constants and types of the radix-2 Booth FFT.
//
// The data path is 32 bits wide and holds Q2.30 fixed-point numbers (two
// integer bits including the sign, thirty fraction bits); products of two
// such numbers are 64-bit Q4.60 values. A complex sample is stored as one
// 64-bit word, real part in the upper half. The sizes follow the evaluated
// configuration: 32-bit data, Q2.30, 1024-point FFT.
package fft_pkg;
  localparam int DW        = 32;  // data word width
  localparam int FRAC      = 30;  // fraction bits of a data word (Q2.30)
  localparam int LOG2N_MAX = 10;  // largest FFT: 1024 points

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;
endpackage
