// tb_crt_term_rom: self-checking test of the t-ROM.
// For moduli 13 and 7 of the system {16, 5, 7, 11, 13} (M = 80080) every
// residue r is applied; the expected t is found here by search, as the
// multiple of M/m_i congruent to r modulo m_i, and compared one clock later.
module tb_crt_term_rom;
  localparam int unsigned BIG_M = 80080;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] r;
  logic [16:0] t13, t7;

  crt_term_rom #(.MOD(13), .BIG_M(BIG_M)) dut13 (.clk, .r(r),      .t(t13));
  crt_term_rom #(.MOD(7),  .BIG_M(BIG_M)) dut7  (.clk, .r(r[2:0]), .t(t7));

  function automatic int unsigned summand(int unsigned rr, int unsigned mi);
    int unsigned mhat = BIG_M / mi;
    for (int unsigned k = 0; k < mi; k++)
      if ((k * mhat) % mi == rr) return k * mhat;
    return 32'hFFFF_FFFF;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      r = 4'(i);
      @(posedge clk); #1;
      if (i < 13) begin
        checks++;
        if (32'(t13) != summand(i, 13)) begin
          failures++; $display("FAIL m13 r=%0d t=%0d exp %0d", i, t13, summand(i, 13));
        end
      end
      if (i < 7) begin
        checks++;
        if (32'(t7) != summand(i, 7)) begin
          failures++; $display("FAIL m7 r=%0d t=%0d exp %0d", i, t7, summand(i, 7));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
