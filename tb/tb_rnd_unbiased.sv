// tb_rnd_unbiased: the rounding unit against the remainder-based model, on
// exact ties (which must go to the even neighbour, in both directions and
// for both signs), values just above and below a tie, and random values,
// with and without the divide-by-two. It also checks that the mean error
// over many ties is zero, i.e. that the rounding is unbiased.
module tb_rnd_unbiased;
  import fft_ref_pkg::*;
  localparam int IW = 63;
  logic signed [IW-1:0] v;
  logic                 scale;
  logic signed [31:0]   y;
  int checks = 0, failures = 0;

  rnd_unbiased #(.DW(32), .FB(30), .IW(IW)) dut (.v, .scale, .y);

  task automatic check(longint val, bit sc);
    v = IW'(val); scale = sc;
    #1; checks++;
    if (y !== rnd_ref(longint'(v), sc ? 31 : 30)) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d scale=%0b y=%0d exp=%0d", v, sc, y,
                                  rnd_ref(longint'(v), sc ? 31 : 30));
    end
  endtask

  initial begin
    longint bias, q;
    // hand-worked ties: 2.5 -> 2, 3.5 -> 4, -2.5 -> -2, -3.5 -> -4
    v = IW'(longint'(5) <<< 29); scale = 0; #1; checks++; if (y !== 2)  failures++;
    v = IW'(longint'(7) <<< 29); #1;            checks++; if (y !== 4)  failures++;
    v = IW'(-(longint'(5) <<< 29)); #1;         checks++; if (y !== -2) failures++;
    v = IW'(-(longint'(7) <<< 29)); #1;         checks++; if (y !== -4) failures++;
    // with divide-by-two: 5/2 = 2.5 -> 2, 3/2 = 1.5 -> 2, 7/2 = 3.5 -> 4,
    // -5/2 -> -2, (5 + 2^-30)/2 -> 3
    v = IW'(longint'(5) <<< 30); scale = 1; #1; checks++; if (y !== 2)  failures++;
    v = IW'(longint'(3) <<< 30); #1;            checks++; if (y !== 2)  failures++;
    v = IW'(longint'(7) <<< 30); #1;            checks++; if (y !== 4)  failures++;
    v = IW'(-(longint'(5) <<< 30)); #1;         checks++; if (y !== -2) failures++;
    v = IW'((longint'(5) <<< 30) + 1); #1;      checks++; if (y !== 3)  failures++;
    for (int i = -300; i < 300; i++) begin
      for (int d = -1; d <= 1; d++) begin
        check((longint'(2 * i + 1) <<< 29) + longint'(d), 0);
        check((longint'(2 * i + 1) <<< 30) + longint'(d), 1);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      q = {$urandom, $urandom};
      check(q >>> ($urandom % 40 + 1), i[0]);
    end
    // bias over consecutive ties is zero
    bias = 0;
    v = '0;
    for (int i = -500; i < 500; i++) begin
      v = IW'(longint'(2 * i + 1) <<< 29); scale = 0; #1;
      bias += longint'(y) * 2 - longint'(2 * i + 1);
    end
    checks++;
    if (bias != 0) begin failures++; $display("FAIL bias %0d", bias); end
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
