// tb_crt_eac_adder: self-checking test of the end-around-carry adder modulo
// 2^8 - 1 = 255 with three terms (the moduli set {3, 5, 17}).
// Random terms t_i < 255 and directed sums (0, exactly 255, 511 which makes
// the first fold carry, the maximum 762) are applied; the output one clock
// later is compared with (sum t_i) mod 255 worked out here.  The test counts
// sums that need the end-around fold, sums whose first fold carries, and
// sums equal to a nonzero multiple of 255, and fails if any never occurs.
module tb_crt_eac_adder;
  localparam int unsigned N = 3, C = 8, BIG_M = 255;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fold = 0, n_carry = 0, n_zero = 0;
  logic [N-1:0][C-1:0] t;
  logic [C-1:0]        x;

  crt_eac_adder #(.N(N), .C(C)) dut (.clk, .t, .x);

  task automatic apply();
    int unsigned s = 0;
    for (int i = 0; i < N; i++) s += t[i];
    if (s >= 256) n_fold++;
    if ((s % 256) + (s / 256) >= 256) n_carry++;
    if (s != 0 && s % BIG_M == 0) n_zero++;
    @(posedge clk); #1;
    checks++;
    if (32'(x) != s % BIG_M) begin
      failures++;
      $display("FAIL sum=%0d got %0d exp %0d", s, x, s % BIG_M);
    end
  endtask

  task automatic set3(input int unsigned a, input int unsigned b, input int unsigned c);
    t[0] = C'(a); t[1] = C'(b); t[2] = C'(c);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set3(0, 0, 0);       apply();
    set3(254, 1, 0);     apply();
    set3(254, 254, 3);   apply();
    set3(254, 254, 254); apply();
    set3(200, 200, 110); apply();
    repeat (5000) begin
      for (int i = 0; i < N; i++) t[i] = C'($urandom_range(BIG_M - 1));
      apply();
    end
    $display("folds %0d, first-fold carries %0d, multiples of M %0d", n_fold, n_carry, n_zero);
    if (n_fold == 0 || n_carry == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
