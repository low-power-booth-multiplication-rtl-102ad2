// tb_radar_frame: a range-Doppler frame computed on the FFT engine at its
// default size, the way an FMCW radar frame is processed: one 1024-point
// range FFT per chirp on real 12-bit beat-signal samples (the upper half of
// each spectrum mirrors the lower half and is dropped, leaving 512 range
// bins), then one NCH-point Doppler FFT per range bin across the chirps.
//
// The scene is synthetic: a strong static reflection close by (a bumper or
// radome), three moving targets whose amplitude falls with range, and
// Gaussian noise of about two LSBs. Every FFT is compared bit for bit with
// fft_ref_pkg::fft_ref, every run must take L*(N/2+2)+1 clocks, and every
// target must stand out in the range-Doppler map at its (range, Doppler)
// cell. The frame has the full evaluated size: 512 chirps of 1024 samples,
// 512 range FFTs of 1024 points and 512 Doppler FFTs of 512 points. The
// share of zero Booth groups on the data and twiddle inputs is printed per
// pass.
module tb_radar_frame;
  import fft_ref_pkg::*;
  localparam int LMAX = 10;
  localparam int NR   = 1 << LMAX;   // samples per chirp
  localparam int NB   = NR / 2;      // range bins kept
  localparam int LD   = 9;
  localparam int NCH  = 1 << LD;     // chirps in the frame
  localparam int NT   = 4;           // reflections in the scene

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
  longint zg_data = 0, zg_tw = 0, groups = 0;

  function automatic int zero_groups(word_t v);
    logic [32:0] x = {v, 1'b0};
    int z = 0;
    for (int i = 0; i < 16; i++) if (x[2*i +: 3] == 3'b000 || x[2*i +: 3] == 3'b111) z++;
    return z;
  endfunction

  always @(posedge clk) begin
    if (dut.bf_valid) begin
      zg_data += zero_groups(dut.u_bf.x1_re) + zero_groups(dut.u_bf.x1_im);
      zg_tw   += zero_groups(dut.u_bf.tw_re) + zero_groups(dut.u_bf.tw_im);
      groups  += 32;
    end
  end

  word_t xr[NR], xi[NR], er[NR], ei[NR];
  word_t rng_re[NCH][NB], rng_im[NCH][NB];
  real   mag[NB][NCH];

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  task automatic run_fft(int L);
    int n = 1 << L, cycles;
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
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != L * (n / 2 + 2) + 1) failures++;
    er = xr; ei = xi;
    fft_ref(L, er, ei);
    for (int k = 0; k <= n; k++) begin
      if (k > 0) begin
        checks++;
        if (rd_re !== er[k-1] || rd_im !== ei[k-1]) begin
          failures++;
          if (failures < 10) $display("FAIL L=%0d bin %0d", L, k - 1);
        end
        xr[k-1] = rd_re; xi[k-1] = rd_im;
      end
      rd_addr = LMAX'(k);
      @(negedge clk);
    end
  endtask

  initial begin
    // scene: range bin, Doppler bin, amplitude in 12-bit LSBs
    int    t_rng[NT] = '{6, 90, 210, 400};
    int    t_dop[NT] = '{0, 5, NCH - 9, 20};
    real   t_amp[NT] = '{1500.0, 60.0, 8.0, 2.0};
    real   v, avg;
    longint s12;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // range FFTs
    for (int c = 0; c < NCH; c++) begin
      for (int n = 0; n < NR; n++) begin
        v = gauss();
        for (int t = 0; t < NT; t++)
          v += t_amp[t] * $cos(2.0 * PI * (real'(t_rng[t]) * n / NR +
                                          real'(t_dop[t]) * c / NCH + 0.1 * t));
        s12 = longint'($floor(v + 0.5));
        if (s12 > 2047) s12 = 2047;
        if (s12 < -2048) s12 = -2048;
        xr[n] = word_t'(s12 <<< 15);
        xi[n] = 0;
      end
      run_fft(LMAX);
      for (int k = 0; k < NB; k++) begin
        rng_re[c][k] = xr[k];
        rng_im[c][k] = xi[k];
      end
    end
    $display("range FFTs: zero Booth groups on data (B) %0d/1000, on twiddles %0d/1000",
             int'((zg_data * 1000) / groups), int'((zg_tw * 1000) / groups));
    zg_data = 0; zg_tw = 0; groups = 0;

    // Doppler FFTs
    avg = 0.0;
    for (int k = 0; k < NB; k++) begin
      for (int c = 0; c < NCH; c++) begin
        xr[c] = rng_re[c][k];
        xi[c] = rng_im[c][k];
      end
      run_fft(LD);
      for (int d = 0; d < NCH; d++) begin
        mag[k][d] = $sqrt(real'(xr[d]) * real'(xr[d]) + real'(xi[d]) * real'(xi[d]));
        avg += mag[k][d];
      end
    end
    avg = avg / (NB * NCH);
    $display("Doppler FFTs: zero Booth groups on data (B) %0d/1000, on twiddles %0d/1000",
             int'((zg_data * 1000) / groups), int'((zg_tw * 1000) / groups));

    // every reflection stands out at its cell
    for (int t = 0; t < NT; t++) begin
      $display("target %0d at range %0d Doppler %0d: %0.1f x the map average",
               t, t_rng[t], t_dop[t], mag[t_rng[t]][t_dop[t]] / avg);
      checks++;
      if (mag[t_rng[t]][t_dop[t]] < 4.0 * avg) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
