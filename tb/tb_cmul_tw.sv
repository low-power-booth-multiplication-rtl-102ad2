// tb_cmul_tw: the complex multiplier against 64-bit integer products, for
// random data and twiddle values and for exact twiddles 1, -i and -1. It
// also checks by hierarchical reference that each multiplier's
// partial-product input (b) carries the data and its multiplicand (a) the
// twiddle, which is the operand assignment the design is about.
module tb_cmul_tw;
  logic signed [31:0] tw_re, tw_im, x_re, x_im;
  logic signed [63:0] p_re, p_im;
  int checks = 0, failures = 0;

  cmul_tw #(.DW(32)) dut (.tw_re, .tw_im, .x_re, .x_im, .p_re, .p_im);

  task automatic check();
    longint er, ei;
    #1;
    er = longint'(x_re) * longint'(tw_re) - longint'(x_im) * longint'(tw_im);
    ei = longint'(x_re) * longint'(tw_im) + longint'(x_im) * longint'(tw_re);
    checks++;
    if (p_re !== er || p_im !== ei) begin
      failures++;
      if (failures < 10) $display("FAIL x=(%0d,%0d) w=(%0d,%0d) p=(%0d,%0d) exp=(%0d,%0d)",
                                  x_re, x_im, tw_re, tw_im, p_re, p_im, er, ei);
    end
    checks++;
    if (dut.u_rr.b !== x_re || dut.u_ri.b !== x_re || dut.u_ii.b !== x_im ||
        dut.u_ir.b !== x_im || dut.u_rr.a !== tw_re || dut.u_ii.a !== tw_im ||
        dut.u_ri.a !== tw_im || dut.u_ir.a !== tw_re) failures++;
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x_re  = $signed($urandom) >>> ($urandom % 32);
      x_im  = $signed($urandom) >>> ($urandom % 32);
      tw_re = $signed($urandom) >>> 1;
      tw_im = $signed($urandom) >>> 1;
      if (i % 4 == 1) begin tw_re = 32'sh40000000; tw_im = 0; end
      if (i % 4 == 2) begin tw_re = 0; tw_im = -32'sh40000000; end
      if (i % 4 == 3) begin tw_re = -32'sh40000000; tw_im = 0; end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
