// tb_twiddle_rom: reads every entry of the default 1024-point table and of
// a 16-point instance. Each entry must match round(2^30*cos), round(-2^30*sin)
// computed in the testbench, have unit magnitude to within rounding, and
// the exact values W^0 = 1 and W^(N/4) = -i must appear where expected. The
// read data must arrive one clock after the address.
module tb_twiddle_rom;
  import fft_ref_pkg::*;
  logic clk = 0;
  logic [8:0] addr = 0;
  logic [2:0] addr16 = 0;
  word_t tw_re, tw_im, t16_re, t16_im;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOG2N(10), .DW(32), .FRAC(30)) dut   (.clk, .addr(addr), .tw_re, .tw_im);
  twiddle_rom #(.LOG2N(4),  .DW(32), .FRAC(30)) dut16 (.clk, .addr(addr16), .tw_re(t16_re), .tw_im(t16_im));

  always #5 clk = ~clk;

  initial begin
    word_t er, ei;
    real mag;
    for (int k = 0; k < 512; k++) begin
      @(negedge clk); addr = 9'(k); addr16 = 3'(k % 8);
      @(negedge clk);
      tw_ref(10, k, er, ei);
      checks++;
      if (tw_re !== er || tw_im !== ei) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d (%0d,%0d) exp (%0d,%0d)", k, tw_re, tw_im, er, ei);
      end
      mag = (real'(tw_re) * real'(tw_re) + real'(tw_im) * real'(tw_im)) / (2.0 ** 60);
      checks++;
      if (mag > 1.0 + 4.0e-9 || mag < 1.0 - 4.0e-9) failures++;
      tw_ref(4, k % 8, er, ei);
      checks++;
      if (t16_re !== er || t16_im !== ei) failures++;
      if (k == 0)   begin checks++; if (tw_re !== 32'sh40000000 || tw_im !== 0) failures++; end
      if (k == 256) begin checks++; if (tw_re !== 0 || tw_im !== -32'sh40000000) failures++; end
    end
    // one-cycle latency: data changes only at the clock edge after addr
    @(negedge clk); addr = 9'd128;
    #1; checks++;
    if (tw_re === 32'sh2d413ccd) failures++;  // not yet (old entry 511)
    @(negedge clk);
    checks++;
    if (tw_re !== 32'sh2d413ccd) failures++;  // cos(pi/4) * 2^30
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
