// tb_booth_activity: switching activity of the Booth partial products with
// the data on the partial-product input (as built) against the same
// multipliers with the operands the other way round.
//
// The FFT engine at its default size runs three 1024-point FFTs: the weak
// tone (1/4096 of full scale plus ~2 LSB noise), the strong tone
// (4000/4096 plus noise) and a radar-like beat signal (a strong near echo,
// weaker far echoes, noise). For every butterfly the operands at the
// engine's butterfly are also applied to four reference multipliers wired
// the conventional way (twiddle on B). Toggles of all partial-product bits
// and negate bits from one butterfly to the next are counted for both
// arrangements, as a measure of the dynamic power of the multipliers.
// Checks: the built arrangement toggles less for every signal, and both
// arrangements give identical products.
module tb_booth_activity;
  import fft_ref_pkg::*;
  localparam int LMAX = 10;
  localparam int NR   = 1 << LMAX;
  localparam int NG   = 16;

  logic clk = 0, rst_n = 0;
  logic [3:0] log2n = 0;
  logic start = 0, busy, done;
  logic ld_we = 0;
  logic [LMAX-1:0] ld_addr = 0, rd_addr = 0;
  word_t ld_re = 0, ld_im = 0, rd_re, rd_im;

  fft_r2_seq dut (.clk, .rst_n, .log2n, .start, .busy, .done,
    .ld_we, .ld_addr, .ld_re, .ld_im, .rd_addr, .rd_re, .rd_im);

  always #5 clk = ~clk;

  // conventional arrangement: data on the multiplicand, twiddle on B
  word_t x_re, x_im, t_re, t_im;
  assign x_re = dut.u_bf.x1_re;
  assign x_im = dut.u_bf.x1_im;
  assign t_re = dut.u_bf.tw_re;
  assign t_im = dut.u_bf.tw_im;
  logic signed [63:0] s_rr, s_ii, s_ri, s_ir;
  booth_mult #(.AW(32), .BW(32)) sw_rr (.a(x_re), .b(t_re), .p(s_rr));
  booth_mult #(.AW(32), .BW(32)) sw_ii (.a(x_im), .b(t_im), .p(s_ii));
  booth_mult #(.AW(32), .BW(32)) sw_ri (.a(x_re), .b(t_im), .p(s_ri));
  booth_mult #(.AW(32), .BW(32)) sw_ir (.a(x_im), .b(t_re), .p(s_ir));

  int checks = 0, failures = 0;
  longint tog_built = 0, tog_swap = 0;
  logic [NG*34-1:0] prev_b [4], prev_s [4];

  // all partial-product and negate bits of one multiplier, flattened
  function automatic logic [NG*34-1:0] flat(logic signed [32:0] pp[NG], logic neg[NG]);
    logic [NG*34-1:0] f;
    for (int i = 0; i < NG; i++) f[i*34 +: 34] = {neg[i], pp[i]};
    return f;
  endfunction

  always @(posedge clk) begin
    logic [NG*34-1:0] cb [4], cs [4];
    if (dut.bf_valid) begin
      cb[0] = flat(dut.u_bf.u_cmul.u_rr.pp, dut.u_bf.u_cmul.u_rr.neg);
      cb[1] = flat(dut.u_bf.u_cmul.u_ii.pp, dut.u_bf.u_cmul.u_ii.neg);
      cb[2] = flat(dut.u_bf.u_cmul.u_ri.pp, dut.u_bf.u_cmul.u_ri.neg);
      cb[3] = flat(dut.u_bf.u_cmul.u_ir.pp, dut.u_bf.u_cmul.u_ir.neg);
      cs[0] = flat(sw_rr.pp, sw_rr.neg);
      cs[1] = flat(sw_ii.pp, sw_ii.neg);
      cs[2] = flat(sw_ri.pp, sw_ri.neg);
      cs[3] = flat(sw_ir.pp, sw_ir.neg);
      for (int m = 0; m < 4; m++) begin
        tog_built += $countones(cb[m] ^ prev_b[m]);
        tog_swap  += $countones(cs[m] ^ prev_s[m]);
        prev_b[m] = cb[m];
        prev_s[m] = cs[m];
      end
      checks++;
      if (s_rr !== dut.u_bf.u_cmul.rr || s_ii !== dut.u_bf.u_cmul.ii ||
          s_ri !== dut.u_bf.u_cmul.ri || s_ir !== dut.u_bf.u_cmul.ir) failures++;
    end
  end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  task automatic run_signal(string name, int kind);
    real v;
    longint s12;
    int cycles;
    @(negedge clk);
    log2n = 4'(LMAX);
    for (int n = 0; n < NR; n++) begin
      v = gauss();
      case (kind)
        0: v += 2048.0 / 4096.0 * $sin(2.0 * PI * 37.0 * n / NR);
        1: v += 2048.0 * 4000.0 / 4096.0 * $sin(2.0 * PI * 37.0 * n / NR);
        default: v += 1500.0 * $cos(2.0 * PI * 6.0 * n / NR) +
                      60.0 * $cos(2.0 * PI * 90.0 * n / NR + 0.3) +
                      8.0 * $cos(2.0 * PI * 210.0 * n / NR + 0.7);
      endcase
      s12 = longint'($floor(v + 0.5));
      if (s12 > 2047) s12 = 2047;
      if (s12 < -2048) s12 = -2048;
      ld_we = 1; ld_addr = LMAX'(n); ld_re = word_t'(s12 <<< 15); ld_im = 0;
      @(negedge clk);
    end
    ld_we = 0;
    tog_built = 0; tog_swap = 0;
    for (int m = 0; m < 4; m++) begin prev_b[m] = '0; prev_s[m] = '0; end
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 20000) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (!done) failures++;
    $display("%s: partial-product toggles, data on B %0d, twiddle on B %0d (%0.1f %% fewer)",
             name, tog_built, tog_swap,
             100.0 * real'(tog_swap - tog_built) / real'(tog_swap));
    checks++;
    if (tog_built >= tog_swap) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_signal("weak tone  ", 0);
    run_signal("strong tone", 1);
    run_signal("beat signal", 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
