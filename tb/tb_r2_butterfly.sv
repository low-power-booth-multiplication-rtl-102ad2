// tb_r2_butterfly: the butterfly against the integer reference model
// (fft_ref_pkg::bf_ref) for random operands of every magnitude, exact
// twiddles, ties in the rounding and both settings of `scale`. Operands
// are applied back to back, one per clock, and each result is expected
// exactly one clock later; out_valid must follow in_valid with the same
// delay, including gaps.
module tb_r2_butterfly;
  import fft_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, scale = 0, out_valid;
  word_t x0_re, x0_im, x1_re, x1_im, tw_re, tw_im;
  word_t y0_re, y0_im, y1_re, y1_im;
  int checks = 0, failures = 0;

  r2_butterfly #(.DW(32), .FRAC(30)) dut (
    .clk, .rst_n, .in_valid, .scale,
    .x0_re, .x0_im, .x1_re, .x1_im, .tw_re, .tw_im,
    .out_valid, .y0_re, .y0_im, .y1_re, .y1_im
  );

  always #5 clk = ~clk;

  function automatic word_t rnd_operand(int kind);
    case (kind % 4)
      0: return $signed($urandom) >>> ($urandom % 32);     // any size
      1: return $signed($urandom) >>> 26;                  // small
      2: return $signed($urandom) >>> 2;                   // |x| < 1
      default: return $signed($urandom) >>> 1;            // |x| < 2
    endcase
  endfunction

  word_t e0r, e0i, e1r, e1i;
  bit    exp_valid;

  initial begin
    x0_re = 0; x0_im = 0; x1_re = 0; x1_im = 0; tw_re = 0; tw_im = 0;
    exp_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      // check the result of the previous cycle's operands
      checks++;
      if (out_valid !== exp_valid) failures++;
      if (exp_valid) begin
        checks++;
        if (y0_re !== e0r || y0_im !== e0i || y1_re !== e1r || y1_im !== e1i) begin
          failures++;
          if (failures < 10) $display("FAIL y=(%0d,%0d,%0d,%0d) exp=(%0d,%0d,%0d,%0d)",
                                      y0_re, y0_im, y1_re, y1_im, e0r, e0i, e1r, e1i);
        end
      end
      // next operands
      in_valid = (i % 7) != 3;
      scale    = $urandom % 2;
      x0_re = rnd_operand($urandom); x0_im = rnd_operand($urandom);
      x1_re = rnd_operand($urandom); x1_im = rnd_operand($urandom);
      if (x1_re[31] != x1_re[30]) x1_re = x1_re >>> 1;     // keep |x1| < 1.5
      if (x1_im[31] != x1_im[30]) x1_im = x1_im >>> 1;
      case (i % 5)
        0: begin tw_re = 32'sh40000000; tw_im = 0; end
        1: begin tw_re = 0; tw_im = -32'sh40000000; end
        2: tw_ref(10, $urandom % 512, tw_re, tw_im);
        3: begin tw_ref(10, $urandom % 512, tw_re, tw_im);
                 x1_re = x1_re & ~32'h3; x1_im = x1_im | 32'h1; end
        default: begin tw_re = 32'sh20000000; tw_im = 32'sh20000000; end   // ties
      endcase
      bf_ref(x0_re, x0_im, x1_re, x1_im, tw_re, tw_im, scale, e0r, e0i, e1r, e1i);
      exp_valid = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
