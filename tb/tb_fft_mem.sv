// tb_fft_mem: the two-read/two-write sample memory (default 1024 x 64)
// against an array model. Random writes on both ports and random reads on
// both ports every clock; read data must appear one clock after the
// address and show the contents from before a write on the same edge.
module tb_fft_mem;
  localparam int LOG2N = 10, W = 64;
  logic clk = 0;
  logic [LOG2N-1:0] ra0, ra1, wa0, wa1;
  logic [W-1:0]     rd0, rd1, wd0, wd1;
  logic             we0, we1;
  logic [W-1:0]     model [2**LOG2N];
  int checks = 0, failures = 0;

  fft_mem #(.LOG2N(LOG2N), .W(W)) dut (.clk, .ra0, .ra1, .rd0, .rd1,
    .we0, .wa0, .wd0, .we1, .wa1, .wd1);

  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] e0, e1;
    bit           chk;
    we0 = 0; we1 = 0; ra0 = 0; ra1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0;
    // fill every word through both ports
    for (int a = 0; a < 2**LOG2N; a += 2) begin
      @(negedge clk);
      we0 = 1; wa0 = LOG2N'(a);     wd0 = {$urandom, $urandom};
      we1 = 1; wa1 = LOG2N'(a + 1); wd1 = {$urandom, $urandom};
      model[a] = wd0; model[a + 1] = wd1;
    end
    chk = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (chk) begin
        checks += 2;
        if (rd0 !== e0) failures++;
        if (rd1 !== e1) failures++;
      end
      ra0 = LOG2N'($urandom); ra1 = LOG2N'($urandom);
      if (i % 3 == 0) ra1 = wa0;            // read a word being written now
      e0 = model[ra0]; e1 = model[ra1];     // old contents
      we0 = $urandom % 2; we1 = $urandom % 2;
      wa0 = LOG2N'($urandom); wa1 = LOG2N'($urandom);
      if (wa1 == wa0) wa1 = wa0 + 1'b1;
      if (i % 3 == 0) ra1 = wa0;
      e1 = model[ra1];
      wd0 = {$urandom, $urandom}; wd1 = {$urandom, $urandom};
      if (we0) model[wa0] = wd0;
      if (we1) model[wa1] = wd1;
      chk = 1;
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
