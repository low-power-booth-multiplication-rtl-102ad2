// tb_booth_ppg: exhaustive check of the radix-4 Booth partial-product
// generator for all eight groups and random multiplicands (plus the extreme
// values): (pp + neg) must equal the multiple -2..+2 of A from the Booth
// table, and `zero` must mark exactly the +0/-0 groups.
module tb_booth_ppg;
  localparam int AW = 32;
  logic signed [AW-1:0] a;
  logic        [2:0]    grp;
  logic signed [AW:0]   pp;
  logic                 neg, zero;
  int checks = 0, failures = 0;

  booth_ppg #(.AW(AW)) dut (.a, .grp, .pp, .neg, .zero);

  // Booth table: multiple selected by {b(2i+1), b(2i), b(2i-1)}
  function automatic int mult_of(logic [2:0] g);
    case (g)
      3'b000: return 0;  3'b001: return 1;  3'b010: return 1;  3'b011: return 2;
      3'b100: return -2; 3'b101: return -1; 3'b110: return -1; default: return 0;
    endcase
  endfunction

  initial begin
    longint exp_v, got;
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: a = 32'sh7fffffff;
        1: a = 32'sh80000000;
        2: a = 0;
        3: a = -1;
        default: a = $urandom;
      endcase
      for (int g = 0; g < 8; g++) begin
        grp = 3'(g);
        #1;
        exp_v = longint'(mult_of(grp)) * longint'(a);
        got   = longint'(pp) + longint'(neg);
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d grp=%b got %0d exp %0d", a, grp, got, exp_v);
        end
        checks++;
        if (zero !== (mult_of(grp) == 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
