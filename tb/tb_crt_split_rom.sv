// tb_crt_split_rom: self-checking test of the split CRT summand ROM.
// For moduli 13, 5 and 16 of the system {16, 5, 7, 11, 13} (M = 80080,
// M/16 = 5005) every residue r is applied.  The expected summand is found
// here by search, as the multiple of M/m_i that is congruent to r modulo
// m_i, and compared with q*5005 + rho one clock later; q < 16 and
// rho < 5005 are checked as well.
module tb_crt_split_rom;
  localparam int unsigned BIG_M = 80080;
  localparam int unsigned MP    = 5005;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] r;
  logic [3:0] q13, q5, q16;
  logic [12:0] rho13, rho5, rho16;

  crt_split_rom #(.MOD(13), .BIG_M(BIG_M), .K(4)) dut13 (.clk, .r(r),      .q(q13), .rho(rho13));
  crt_split_rom #(.MOD(5),  .BIG_M(BIG_M), .K(4)) dut5  (.clk, .r(r[2:0]), .q(q5),  .rho(rho5));
  crt_split_rom #(.MOD(16), .BIG_M(BIG_M), .K(4)) dut16 (.clk, .r(r),      .q(q16), .rho(rho16));

  function automatic int unsigned summand(int unsigned rr, int unsigned mi);
    int unsigned mhat = BIG_M / mi;
    for (int unsigned k = 0; k < mi; k++)
      if ((k * mhat) % mi == rr) return k * mhat;
    return 32'hFFFF_FFFF;
  endfunction

  task automatic check_one(string name, int unsigned rr, int unsigned mi,
                           logic [3:0] q, logic [12:0] rho);
    int unsigned exp_s = summand(rr, mi);
    checks++;
    if (32'(q) * MP + 32'(rho) != exp_s || rho >= 13'(MP)) begin
      failures++;
      $display("FAIL %s r=%0d q=%0d rho=%0d expected S=%0d", name, rr, q, rho, exp_s);
    end
  endtask

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
      if (i < 13) check_one("m13", i, 13, q13, rho13);
      if (i < 5)  check_one("m5",  i, 5,  q5,  rho5);
      check_one("m16", i, 16, q16, rho16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
