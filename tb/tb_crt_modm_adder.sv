// tb_crt_modm_adder: self-checking test of the general modulo-M adder
// (N = 5, M = 80080).  Random terms t_i < M, plus all-zero and all-(M-1)
// inputs, are applied; the output one clock later is compared with
// (sum t_i) mod M worked out here.  The test counts the number of multiples
// of M removed and fails unless every count 0..N-1 has been seen.
module tb_crt_modm_adder;
  localparam int unsigned N = 5, BIG_M = 80080;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [N];
  logic [N-1:0][16:0] t;
  logic [16:0]        x;

  crt_modm_adder #(.N(N), .BIG_M(BIG_M)) dut (.clk, .t, .x);

  task automatic apply();
    longint unsigned s = 0;
    for (int i = 0; i < N; i++) s += t[i];
    seen[s / BIG_M]++;
    @(posedge clk); #1;
    checks++;
    if (64'(x) != s % BIG_M) begin
      failures++;
      $display("FAIL sum=%0d got %0d exp %0d", s, x, s % BIG_M);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    t = '0;
    apply();
    for (int i = 0; i < N; i++) t[i] = 17'(BIG_M - 1);
    apply();
    for (int k = 0; k < N; k++) begin
      // Exactly k*M: the sum sits on a reduction boundary.
      for (int i = 0; i < N; i++) t[i] = '0;
      for (int i = 0; i < k; i++) t[i] = 17'(BIG_M - 1);
      t[N-1] = 17'(k);
      apply();
    end
    repeat (5000) begin
      for (int i = 0; i < N; i++) t[i] = 17'($urandom_range(BIG_M - 1));
      apply();
    end
    foreach (seen[i]) begin
      $display("sums with %0d multiples of M removed: %0d", i, seen[i]);
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
