// tb_crt_vu_decoder: self-checking test of the four-level power-of-two CRT
// decoder (N = 5, M = 80080, K = 4, M/2^K = 5005).
// Random split summands q_i < 16, rho_i < 5005 are applied and the output
// one clock later is compared with (5005*sum q_i + sum rho_i) mod M worked
// out here.  The test also counts how often the mod-16 sum of the q_i
// wraps, how often the level-3 adder carries (no correction) and how often
// the level-4 correction is used, and fails if any of them never happens.
// Directed cases cover all-zero and all-maximum inputs.
module tb_crt_vu_decoder;
  localparam int unsigned N = 5, BIG_M = 80080, K = 4, MP = 5005;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_carry = 0, n_corr = 0;
  logic [N-1:0][K-1:0]  q;
  logic [N-1:0][12:0]   rho;
  logic [16:0]          x;

  crt_vu_decoder #(.N(N), .BIG_M(BIG_M), .K(K)) dut (.clk, .q, .rho, .x);

  task automatic apply();
    longint unsigned sq = 0, sr = 0, expv, part;
    for (int i = 0; i < N; i++) begin
      sq += q[i];
      sr += rho[i];
    end
    part = (sq % 16) * MP + sr;
    expv = (sq * MP + sr) % BIG_M;
    if (sq >= 16) n_wrap++;
    if (part >= BIG_M) n_carry++; else n_corr++;
    @(posedge clk); #1;
    checks++;
    if (64'(x) != expv) begin
      failures++;
      $display("FAIL q=%h rho=%h got %0d exp %0d", q, rho, x, expv);
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
    q = '0; rho = '0;
    apply();
    for (int i = 0; i < N; i++) begin q[i] = 4'd15; rho[i] = 13'(MP - 1); end
    apply();
    repeat (5000) begin
      for (int i = 0; i < N; i++) begin
        q[i]   = 4'($urandom_range(15));
        rho[i] = 13'($urandom_range(MP - 1));
      end
      apply();
    end
    $display("q wraps %0d, level-3 carries %0d, level-4 corrections %0d", n_wrap, n_carry, n_corr);
    if (n_wrap == 0 || n_carry == 0 || n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
