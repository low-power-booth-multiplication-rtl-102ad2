// tb_fft_r2_seq: end-to-end test of the sequential FFT at its default size
// (LOG2N_MAX = 10, 32-bit Q2.30 data).
//
// Runs, each loaded through the load port, started, and read back bin by
// bin through the read port:
//   1. 1024 points, weak tone: amplitude 1/4096 of full scale plus Gaussian
//      noise of about two LSBs, 12-bit real samples
//   2. 1024 points, strong tone: amplitude 4000/4096 plus the same noise;
//      load-port writes are attempted during the run and must be ignored
//   3. 512 points (the Doppler FFT size), small complex values
//   4. 8 points and 5. 2 points, random values up to +-0.25
// Every bin is compared bit for bit with fft_ref_pkg::fft_ref. The tone
// runs are also compared with a double-precision DFT scaled by
// 2^-floor(L/2), and the tone's bin must hold the peak. The time from
// start to done must be L*(N/2+2)+1 clocks.
//
// 12-bit samples s enter as s * 2^-15 in Q2.30 (full scale 1/16), so that
// a full-scale tone stays within the +-2 range after the 1/sqrt(N)
// scaling. The testbench counts the mechanisms of the design and fails if
// one never occurs: halving and non-halving butterflies, stall cycles
// between stages, changes of FFT size, load writes ignored while busy.
// It also counts the radix-4 Booth groups (000 or 111, i.e. zero partial
// products) of the values on the multipliers' B inputs (the data) and of
// the twiddles; for the weak tone the data must give more zero groups.
module tb_fft_r2_seq;
  import fft_ref_pkg::*;
  localparam int LMAX = 10;
  localparam int NBIN = 1 << LMAX;

  logic clk = 0, rst_n = 0;
  logic [3:0] log2n = 0;
  logic start = 0, busy, done;
  logic ld_we = 0;
  logic [LMAX-1:0] ld_addr = 0, rd_addr = 0;
  word_t ld_re = 0, ld_im = 0, rd_re, rd_im;

  fft_r2_seq dut (.clk, .rst_n, .log2n, .start, .busy, .done,
    .ld_we, .ld_addr, .ld_re, .ld_im, .rd_addr, .rd_re, .rd_im);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_scaled = 0, n_unscaled = 0, n_stall = 0, n_size_change = 0, n_ignored = 0;
  longint zg_data = 0, zg_tw = 0, groups = 0;
  bit count_groups = 0;

  function automatic int zero_groups(word_t v);
    logic [32:0] x = {v, 1'b0};
    int z = 0;
    for (int i = 0; i < 16; i++) if (x[2*i +: 3] == 3'b000 || x[2*i +: 3] == 3'b111) z++;
    return z;
  endfunction

  always @(posedge clk) begin
    if (dut.bf_valid) begin
      if (dut.bf_scale) n_scaled++; else n_unscaled++;
      if (count_groups) begin
        zg_data += zero_groups(dut.u_bf.x1_re) + zero_groups(dut.u_bf.x1_im);
        zg_tw   += zero_groups(dut.u_bf.tw_re) + zero_groups(dut.u_bf.tw_im);
        groups  += 32;
      end
    end
    if (dut.stall) n_stall++;
  end

  word_t xr[NBIN], xi[NBIN], er[NBIN], ei[NBIN];
  int    last_L = 0;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic word_t sample12(real v);
    longint s = longint'($floor(v + 0.5));
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    return word_t'(s <<< 15);
  endfunction

  // load, run and read back one FFT; poke = try load writes while busy
  task automatic run_fft(int L, bit poke, output int cycles);
    int n = 1 << L;
    if (last_L != 0 && L != last_L) n_size_change++;
    last_L = L;
    @(negedge clk);
    log2n = 4'(L);
    for (int k = 0; k < n; k++) begin
      ld_we = 1; ld_addr = LMAX'(k); ld_re = xr[k]; ld_im = xi[k];
      @(negedge clk);
    end
    ld_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 20000) begin
      if (poke && (cycles % 97 == 5)) begin
        ld_we = 1; ld_addr = LMAX'($urandom); ld_re = $urandom; ld_im = $urandom;
        n_ignored++;
      end else ld_we = 0;
      @(negedge clk);
      cycles++;
    end
    ld_we = 0;
    checks++;
    if (cycles != L * (n / 2 + 2) + 1) begin
      failures++;
      $display("FAIL L=%0d: %0d cycles, expected %0d", L, cycles, L * (n / 2 + 2) + 1);
    end
    // reference
    er = xr; ei = xi;
    fft_ref(L, er, ei);
    for (int k = 0; k <= n; k++) begin
      if (k > 0) begin
        checks++;
        if (rd_re !== er[k-1] || rd_im !== ei[k-1]) begin
          failures++;
          if (failures < 10) $display("FAIL L=%0d bin %0d: (%0d,%0d) expected (%0d,%0d)",
                                      L, k - 1, rd_re, rd_im, er[k-1], ei[k-1]);
        end
        xr[k-1] = rd_re; xi[k-1] = rd_im;   // keep the hardware result
      end
      rd_addr = LMAX'(k);
      @(negedge clk);
    end
  endtask

  // compare the hardware output (now in xr/xi) with a double-precision DFT
  // of the input in/ii; returns the peak bin
  task automatic float_check(int L, real in_r[NBIN], real in_i[NBIN], real tol_lsb,
                             output int peak);
    int n = 1 << L;
    real c[NBIN], s[NBIN], fr, fi, sc, err, maxerr, mag, best;
    for (int k = 0; k < n; k++) begin
      c[k] = $cos(2.0 * PI * k / n);
      s[k] = $sin(2.0 * PI * k / n);
    end
    sc = 2.0 ** (30 - L / 2);
    maxerr = 0.0; best = -1.0; peak = 0;
    for (int k = 0; k < n; k++) begin
      fr = 0.0; fi = 0.0;
      for (int m = 0; m < n; m++) begin
        fr += in_r[m] * c[(k * m) % n] + in_i[m] * s[(k * m) % n];
        fi += in_i[m] * c[(k * m) % n] - in_r[m] * s[(k * m) % n];
      end
      err = (real'(xr[k]) - fr * sc);
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      err = (real'(xi[k]) - fi * sc);
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      mag = real'(xr[k]) * real'(xr[k]) + real'(xi[k]) * real'(xi[k]);
      if (k < n / 2 && mag > best) begin best = mag; peak = k; end
    end
    $display("L=%0d: largest deviation from the double-precision DFT %0.1f LSB", L, maxerr);
    checks++;
    if (maxerr > tol_lsb) failures++;
  endtask

  initial begin
    int cyc, peak;
    real fin_r[NBIN], fin_i[NBIN];
    int zd_weak, zt_weak;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. weak tone, 1024 points
    for (int k = 0; k < NBIN; k++) begin
      xr[k] = sample12(2048.0 / 4096.0 * $sin(2.0 * PI * 37.0 * k / NBIN) + gauss());
      xi[k] = 0;
      fin_r[k] = real'(xr[k]) / (2.0 ** 30); fin_i[k] = 0.0;
    end
    count_groups = 1;
    run_fft(10, 0, cyc);
    count_groups = 0;
    float_check(10, fin_r, fin_i, 64.0, peak);
    zd_weak = int'((zg_data * 1000) / groups);
    zt_weak = int'((zg_tw * 1000) / groups);
    $display("weak tone: zero Booth groups on data (B) %0d/1000, on twiddles %0d/1000", zd_weak, zt_weak);
    checks++;
    if (zd_weak <= zt_weak) failures++;

    // 2. strong tone, 1024 points, with ignored load writes
    for (int k = 0; k < NBIN; k++) begin
      xr[k] = sample12(2048.0 * 4000.0 / 4096.0 * $sin(2.0 * PI * 37.0 * k / NBIN) + gauss());
      xi[k] = 0;
      fin_r[k] = real'(xr[k]) / (2.0 ** 30); fin_i[k] = 0.0;
    end
    zg_data = 0; zg_tw = 0; groups = 0;
    count_groups = 1;
    run_fft(10, 1, cyc);
    count_groups = 0;
    float_check(10, fin_r, fin_i, 64.0, peak);
    checks++;
    if (peak != 37) begin failures++; $display("FAIL peak at bin %0d", peak); end
    $display("strong tone: zero Booth groups on data (B) %0d/1000, on twiddles %0d/1000",
             int'((zg_data * 1000) / groups), int'((zg_tw * 1000) / groups));

    // 3. 512 points, small complex values
    for (int k = 0; k < 512; k++) begin
      xr[k] = $signed($urandom) >>> 12;
      xi[k] = $signed($urandom) >>> 12;
    end
    run_fft(9, 0, cyc);

    // 4. 8 points and 5. 2 points
    for (int k = 0; k < 8; k++) begin
      xr[k] = $signed($urandom) >>> 3;
      xi[k] = $signed($urandom) >>> 3;
    end
    run_fft(3, 0, cyc);
    for (int k = 0; k < 2; k++) begin
      xr[k] = $signed($urandom) >>> 3;
      xi[k] = $signed($urandom) >>> 3;
    end
    run_fft(1, 0, cyc);

    $display("mechanisms: halving butterflies %0d, plain butterflies %0d, stall cycles %0d, size changes %0d, ignored load writes %0d",
             n_scaled, n_unscaled, n_stall, n_size_change, n_ignored);
    checks += 5;
    if (n_scaled == 0)      failures++;
    if (n_unscaled == 0)    failures++;
    if (n_stall == 0)       failures++;
    if (n_size_change == 0) failures++;
    if (n_ignored == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
