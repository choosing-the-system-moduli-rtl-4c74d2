// tb_rns_workloads: the processor over the range of output sizes from 7 to
// 16 bits, one configuration per size, plus the alternative decoder and the
// other two operations.
// Each configuration has pairwise relatively prime moduli whose product is
// at least 2^l - 1 for an l-bit result, and (for the power-of-two decoder)
// one modulus 2^K with N <= 2^K.  The moduli sets are chosen for this test;
// the operands are l bits wide.  Extra instances check: the t-ROM and
// general modulo-M adder on the default moduli and on a set with no power
// of two; addition and subtraction with the default moduli; and the
// end-around-carry decoder on sets whose product is exactly 2^l - 1 for
// l = 8, 9, 10, 11, 12, 14, 15 and 16.
module tb_rns_workloads;
  import rns_pkg::*;
  localparam int NCFG = 23;
  localparam int unsigned MS_8_3_7 [3] = '{8, 3, 7};
  localparam int unsigned MS_8_5_7 [3] = '{8, 5, 7};
  localparam int unsigned MS_16_5_7 [3] = '{16, 5, 7};
  localparam int unsigned MS_16_3_5_7 [4] = '{16, 3, 5, 7};
  localparam int unsigned MS_16_9_5_7 [4] = '{16, 9, 5, 7};
  localparam int unsigned MS_16_9_7_11 [4] = '{16, 9, 7, 11};
  localparam int unsigned MS_16_3_5_7_11 [5] = '{16, 3, 5, 7, 11};
  localparam int unsigned MS_16_9_5_7_11 [5] = '{16, 9, 5, 7, 11};
  localparam int unsigned MS_16_5_7_11_13 [5] = '{16, 5, 7, 11, 13};
  localparam int unsigned MS_3_5_7_11_13_17 [6] = '{3, 5, 7, 11, 13, 17};
  localparam int unsigned MS_3_5_17 [3] = '{3, 5, 17};
  localparam int unsigned MS_3_11_31 [3] = '{3, 11, 31};
  localparam int unsigned MS_9_5_7_13 [4] = '{9, 5, 7, 13};
  localparam int unsigned MS_3_43_127 [3] = '{3, 43, 127};
  localparam int unsigned MS_7_31_151 [3] = '{7, 31, 151};
  localparam int unsigned MS_7_73 [2] = '{7, 73};
  localparam int unsigned MS_23_89 [2] = '{23, 89};
  localparam int unsigned MS_3_5_17_257 [4] = '{3, 5, 17, 257};

  logic clk, rst_n;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk [NCFG];
  int fl  [NCFG];

  rns_cfg_check #(.N(3), .MODULI(MS_8_3_7),            .IN_W(7))  c07 (.clk, .rst_n, .done(done[0]),  .checks(chk[0]),  .failures(fl[0]));
  rns_cfg_check #(.N(3), .MODULI(MS_8_5_7),            .IN_W(8))  c08 (.clk, .rst_n, .done(done[1]),  .checks(chk[1]),  .failures(fl[1]));
  rns_cfg_check #(.N(3), .MODULI(MS_16_5_7),           .IN_W(9))  c09 (.clk, .rst_n, .done(done[2]),  .checks(chk[2]),  .failures(fl[2]));
  rns_cfg_check #(.N(4), .MODULI(MS_16_3_5_7),        .IN_W(10)) c10 (.clk, .rst_n, .done(done[3]),  .checks(chk[3]),  .failures(fl[3]));
  rns_cfg_check #(.N(4), .MODULI(MS_16_9_5_7),        .IN_W(11)) c11 (.clk, .rst_n, .done(done[4]),  .checks(chk[4]),  .failures(fl[4]));
  rns_cfg_check #(.N(4), .MODULI(MS_16_9_5_7),        .IN_W(12)) c12 (.clk, .rst_n, .done(done[5]),  .checks(chk[5]),  .failures(fl[5]));
  rns_cfg_check #(.N(4), .MODULI(MS_16_9_7_11),       .IN_W(13)) c13 (.clk, .rst_n, .done(done[6]),  .checks(chk[6]),  .failures(fl[6]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_3_5_7_11),    .IN_W(14)) c14 (.clk, .rst_n, .done(done[7]),  .checks(chk[7]),  .failures(fl[7]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_9_5_7_11),    .IN_W(15)) c15 (.clk, .rst_n, .done(done[8]),  .checks(chk[8]),  .failures(fl[8]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_5_7_11_13),   .IN_W(16)) c16 (.clk, .rst_n, .done(done[9]),  .checks(chk[9]),  .failures(fl[9]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_5_7_11_13),   .IN_W(16), .DEC(DEC_TSUM))
    t16 (.clk, .rst_n, .done(done[10]), .checks(chk[10]), .failures(fl[10]));
  rns_cfg_check #(.N(6), .MODULI(MS_3_5_7_11_13_17), .IN_W(16), .DEC(DEC_TSUM))
    t16odd (.clk, .rst_n, .done(done[11]), .checks(chk[11]), .failures(fl[11]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_5_7_11_13),   .IN_W(16), .OP(OP_ADD))
    a16 (.clk, .rst_n, .done(done[12]), .checks(chk[12]), .failures(fl[12]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_5_7_11_13),   .IN_W(16), .OP(OP_SUB))
    s16 (.clk, .rst_n, .done(done[13]), .checks(chk[13]), .failures(fl[13]));
  rns_cfg_check #(.N(5), .MODULI(MS_16_5_7_11_13),   .IN_W(16), .OP(OP_SUB), .DEC(DEC_TSUM))
    s16t (.clk, .rst_n, .done(done[14]), .checks(chk[14]), .failures(fl[14]));

  // Moduli whose product is exactly 2^l - 1 (no such set exists for l = 7
  // and l = 13, where 2^l - 1 is prime): end-around-carry decoder.
  rns_cfg_check #(.N(3), .MODULI(MS_3_5_17),   .IN_W(8),  .DEC(DEC_EAC))
    e08 (.clk, .rst_n, .done(done[15]), .checks(chk[15]), .failures(fl[15]));
  rns_cfg_check #(.N(3), .MODULI(MS_3_11_31),  .IN_W(10), .DEC(DEC_EAC))
    e10 (.clk, .rst_n, .done(done[16]), .checks(chk[16]), .failures(fl[16]));
  rns_cfg_check #(.N(4), .MODULI(MS_9_5_7_13), .IN_W(12), .DEC(DEC_EAC))
    e12 (.clk, .rst_n, .done(done[17]), .checks(chk[17]), .failures(fl[17]));
  rns_cfg_check #(.N(3), .MODULI(MS_3_43_127), .IN_W(14), .DEC(DEC_EAC))
    e14 (.clk, .rst_n, .done(done[18]), .checks(chk[18]), .failures(fl[18]));
  rns_cfg_check #(.N(3), .MODULI(MS_7_31_151), .IN_W(15), .DEC(DEC_EAC), .OP(OP_ADD))
    e15 (.clk, .rst_n, .done(done[19]), .checks(chk[19]), .failures(fl[19]));
  rns_cfg_check #(.N(2), .MODULI(MS_7_73),     .IN_W(9),  .DEC(DEC_EAC))
    e09 (.clk, .rst_n, .done(done[20]), .checks(chk[20]), .failures(fl[20]));
  rns_cfg_check #(.N(2), .MODULI(MS_23_89),    .IN_W(11), .DEC(DEC_EAC))
    e11 (.clk, .rst_n, .done(done[21]), .checks(chk[21]), .failures(fl[21]));
  rns_cfg_check #(.N(4), .MODULI(MS_3_5_17_257), .IN_W(16), .DEC(DEC_EAC))
    e16 (.clk, .rst_n, .done(done[22]), .checks(chk[22]), .failures(fl[22]));

  int checks, failures;

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&done);
    #1;
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i];
      failures += fl[i];
      if (chk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
