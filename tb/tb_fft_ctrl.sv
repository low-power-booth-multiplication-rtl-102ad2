// tb_fft_ctrl: the FFT sequencer (LOG2N_MAX = 10) for sizes 2, 8, 16, 512
// and 1024 points. Every issued butterfly is compared with an independent
// enumeration of the radix-2 DIT schedule (stage, group, position ->
// operand addresses, twiddle index, halving on odd stages); each stage must
// touch every address exactly once; the write-back addresses must repeat
// the read addresses two clocks later with wr_en; two stall cycles must
// separate the stages; and done must come L*(N/2+2)+1 clocks after start.
module tb_fft_ctrl;
  localparam int LMAX = 10;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] log2n = 0;
  logic busy, done, stall, bf_valid, bf_scale, wr_en;
  logic [LMAX-1:0] ra0, ra1, wa0, wa1;
  logic [LMAX-2:0] tw_addr;
  int checks = 0, failures = 0;

  fft_ctrl #(.LOG2N_MAX(LMAX)) dut (.clk, .rst_n, .start, .log2n, .busy, .done,
    .stall, .ra0, .ra1, .tw_addr, .bf_valid, .bf_scale, .wr_en, .wa0, .wa1);

  always #5 clk = ~clk;

  // expected schedule
  int exp_a0[$], exp_a1[$], exp_tw[$], exp_sc[$];
  // issue history for the write-back check
  int hist0[$], hist1[$];
  bit hist_v[$];

  task automatic run(int L);
    int n, cyc, idx, stalls, seen[1024], stage_of;
    bit in_run;
    n = 1 << L;
    exp_a0.delete(); exp_a1.delete(); exp_tw.delete(); exp_sc.delete();
    for (int s = 0; s < L; s++)
      for (int g = 0; g < n; g += 2 << s)
        for (int p = 0; p < (1 << s); p++) begin
          exp_a0.push_back(g + p);
          exp_a1.push_back(g + p + (1 << s));
          exp_tw.push_back(p * (1024 >> (s + 1)));
          exp_sc.push_back(s % 2);
        end
    @(negedge clk);
    log2n = 4'(L); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1; idx = 0; stalls = 0;
    hist0.delete(); hist1.delete(); hist_v.delete();
    foreach (seen[i]) seen[i] = 0;
    while (!done && cyc < 20000) begin
      // issue
      hist_v.push_front(busy && !stall);
      hist0.push_front(int'(ra0)); hist1.push_front(int'(ra1));
      if (busy && !stall) begin
        checks++;
        if (idx >= exp_a0.size() || ra0 != exp_a0[idx] || ra1 != exp_a1[idx] ||
            tw_addr != exp_tw[idx]) begin
          failures++;
          if (failures < 10) $display("FAIL L=%0d #%0d ra=(%0d,%0d) tw=%0d", L, idx, ra0, ra1, tw_addr);
        end
        stage_of = idx / (n / 2);
        seen[ra0]++; seen[ra1]++;
        if ((idx + 1) % (n / 2) == 0) begin
          checks++;
          for (int a = 0; a < n; a++) if (seen[a] != stage_of + 1) begin failures++; break; end
        end
        idx++;
      end
      if (stall) stalls++;
      // butterfly-input stage: one clock after issue
      if (hist_v.size() > 1) begin
        checks++;
        if (bf_valid !== hist_v[1]) failures++;
        if (hist_v[1]) begin
          checks++;
          if (bf_scale !== 1'(exp_sc[idx - 1 - (hist_v[0] ? 1 : 0)])) failures++;
        end
      end
      // write-back stage: two clocks after issue
      if (hist_v.size() > 2) begin
        checks++;
        if (wr_en !== hist_v[2]) failures++;
        if (hist_v[2]) begin
          checks++;
          if (wa0 != hist0[2] || wa1 != hist1[2]) failures++;
        end
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (idx != L * n / 2) begin failures++; $display("FAIL L=%0d issued %0d", L, idx); end
    checks++;
    if (stalls != 2 * L) begin failures++; $display("FAIL L=%0d stalls %0d", L, stalls); end
    checks++;
    if (cyc != L * (n / 2 + 2) + 1) begin
      failures++;
      $display("FAIL L=%0d done after %0d cycles, expected %0d", L, cyc, L * (n / 2 + 2) + 1);
    end
    @(negedge clk);
    checks++;
    if (busy || done) failures++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(1); run(3); run(4); run(9); run(10); run(3);
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
