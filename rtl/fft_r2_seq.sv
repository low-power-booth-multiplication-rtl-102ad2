// fft_r2_seq: complex FFT of up to 2^LOG2N_MAX points computed with a
// single radix-2 butterfly whose Booth multipliers take the twiddle factors
// on the multiplicand input and the data on the partial-product input.
//
// Data are Q2.30 (DW = 32 bits, FRAC = 30). The FFT is in-place
// decimation in time: samples are written in natural order through the
// load port and land at bit-reversed addresses; log2(N) stages of N/2
// butterflies each then leave X[k] at address k, read back through the
// read port. Every second stage halves its results with unbiased rounding,
// so the output is scaled by 1/sqrt(N) when log2(N) is even
// (2^-floor(log2(N)/2) in general).
//
// Use: hold log2n (1 .. LOG2N_MAX) stable, write the N samples (ld_we,
// ld_addr = n, ld_re/ld_im), pulse start, wait for the done pulse, then
// present rd_addr = k and take rd_re/rd_im one clock later. Load and read
// are ignored while busy. One butterfly completes per clock; an FFT takes
// log2(N)*(N/2+2)+1 clocks from start to done.
//
// What follows the evaluated design: the butterfly itself (32-bit data
// path, Booth multipliers with swapped inputs, 64-bit product add/sub,
// 32-bit final add/sub, unbiased rounding), the Q2.30 format, the
// 1024-point size, one butterfly used sequentially and the divide-by-two
// every two stages. The memory, its ports, the address sequence, the
// pipeline and the run-time size selection are this design's own.
module fft_r2_seq
  import fft_pkg::cplx_t, fft_pkg::DW, fft_pkg::FRAC;
#(
  parameter int LOG2N_MAX = fft_pkg::LOG2N_MAX
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [3:0]           log2n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic                 ld_we,
  input  logic [LOG2N_MAX-1:0] ld_addr,
  input  logic signed [DW-1:0] ld_re,
  input  logic signed [DW-1:0] ld_im,
  input  logic [LOG2N_MAX-1:0] rd_addr,
  output logic signed [DW-1:0] rd_re,
  output logic signed [DW-1:0] rd_im
);
  // sequencer
  logic                 stall, bf_valid, bf_scale, wr_en;
  logic [LOG2N_MAX-1:0] c_ra0, c_ra1, wa0, wa1;
  logic [LOG2N_MAX-2:0] tw_addr;

  fft_ctrl #(.LOG2N_MAX(LOG2N_MAX)) u_ctrl (
    .clk, .rst_n, .start, .log2n, .busy, .done, .stall,
    .ra0 (c_ra0), .ra1 (c_ra1), .tw_addr,
    .bf_valid, .bf_scale, .wr_en, .wa0, .wa1
  );

  // bit reversal of the low log2n bits of the load index
  logic [LOG2N_MAX-1:0] ld_rev;
  always_comb begin
    logic [LOG2N_MAX-1:0] r;
    for (int b = 0; b < LOG2N_MAX; b++) r[b] = ld_addr[LOG2N_MAX-1-b];
    ld_rev = r >> (LOG2N_MAX - int'(log2n));
  end

  // memory, shared between the load/read ports and the FFT
  cplx_t rd0, rd1, wd0, wd1;
  logic  m_we0;
  logic [LOG2N_MAX-1:0] m_ra0, m_wa0;

  always_comb begin
    if (busy) begin
      m_ra0 = c_ra0;
      m_we0 = wr_en;
      m_wa0 = wa0;
    end else begin
      m_ra0 = rd_addr;
      m_we0 = ld_we;
      m_wa0 = ld_rev;
    end
  end

  cplx_t y0, y1;
  assign wd0 = busy ? y0 : cplx_t'{re: ld_re, im: ld_im};
  assign wd1 = y1;

  fft_mem #(.LOG2N(LOG2N_MAX), .W(2*DW)) u_mem (
    .clk,
    .ra0 (m_ra0), .ra1 (c_ra1), .rd0 (rd0), .rd1 (rd1),
    .we0 (m_we0), .wa0 (m_wa0), .wd0 (wd0),
    .we1 (busy && wr_en), .wa1 (wa1), .wd1 (wd1)
  );

  assign rd_re = rd0.re;
  assign rd_im = rd0.im;

  // twiddle factors
  logic signed [DW-1:0] tw_re, tw_im;
  twiddle_rom #(.LOG2N(LOG2N_MAX), .DW(DW), .FRAC(FRAC)) u_tw (
    .clk, .addr (tw_addr), .tw_re, .tw_im
  );

  // the butterfly: x1 (rd1) is the operand multiplied by the twiddle
  logic bf_out_valid;
  r2_butterfly #(.DW(DW), .FRAC(FRAC)) u_bf (
    .clk, .rst_n,
    .in_valid  (bf_valid),
    .scale     (bf_scale),
    .x0_re     (rd0.re), .x0_im (rd0.im),
    .x1_re     (rd1.re), .x1_im (rd1.im),
    .tw_re, .tw_im,
    .out_valid (bf_out_valid),
    .y0_re     (y0.re), .y0_im (y0.im),
    .y1_re     (y1.re), .y1_im (y1.im)
  );

  // the write-back addresses must line up with the butterfly results
  a_wb_align: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en == bf_out_valid);
  // the stall state only exists inside a run
  a_stall_busy: assert property (@(posedge clk) disable iff (!rst_n)
    stall |-> busy);
endmodule
