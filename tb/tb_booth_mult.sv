// tb_booth_mult: the 32x32 Booth multiplier against the `*` operator on
// corner values (extremes, 0, +-1, powers of two, all-ones patterns) and
// on random operands, including small-magnitude multipliers like the FFT
// data. A second instance with odd widths (7x9) covers the sign-extended
// last group.
module tb_booth_mult;
  logic signed [31:0] a, b;
  logic signed [63:0] p;
  logic signed [6:0]  a7;
  logic signed [8:0]  b9;
  logic signed [15:0] p16;
  int checks = 0, failures = 0;

  booth_mult #(.AW(32), .BW(32)) dut   (.a(a),  .b(b),  .p(p));
  booth_mult #(.AW(7),  .BW(9))  dut_o (.a(a7), .b(b9), .p(p16));

  function automatic logic signed [31:0] pick(int t);
    case (t % 12)
      0: return 32'sh7fffffff;
      1: return 32'sh80000000;
      2: return 0;
      3: return 1;
      4: return -1;
      5: return 32'sh40000000;
      6: return 32'shc0000000;
      7: return 32'sh55555555;
      8: return 32'shaaaaaaaa;
      9: return $signed($urandom) >>> ($urandom % 31);   // small dynamic range
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 144; i++) begin
      a = pick(i / 12); b = pick(i);
      #1; checks++;
      if (p !== longint'(a) * longint'(b)) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a = pick($urandom); b = pick($urandom);
      #1; checks++;
      if (p !== longint'(a) * longint'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end
    for (int x = -64; x < 64; x++)
      for (int y = -256; y < 256; y++) begin
        a7 = 7'(x); b9 = 9'(y);
        #1; checks++;
        if (p16 !== 16'(x * y)) failures++;
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
