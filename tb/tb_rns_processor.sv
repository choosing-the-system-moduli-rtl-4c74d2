// tb_rns_processor: end-to-end test of the RNS processor at its default
// configuration (moduli {16, 5, 7, 11, 13}, M = 80080, 16-bit operands,
// multiplication, power-of-two CRT decoder).
// Operand pairs are streamed in, mostly back to back with random idle
// cycles; every result is compared with (a*b) mod M computed here and must
// appear exactly four clocks after its operands.  For each operation the
// test also works out, independently of the design, the residues, the CRT
// summands and their split form, and counts the mechanisms of the decoder:
// the mod-16 sum of the q_i wrapping, the level-3 carry (no correction),
// the level-4 correction, and a product beyond the dynamic range M that
// wraps modulo M.  It counts back-to-back issues too.  A mechanism that
// never happens is a failure.
module tb_rns_processor;
  localparam int unsigned N = 5;
  localparam int unsigned MODS [N] = '{16, 5, 7, 11, 13};
  localparam longint unsigned BIG_M = 80080, MP = 5005;
  localparam int LAT = 4;
  localparam int NOPS = 20000;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, in_valid, out_valid;
  logic [15:0] a, b;
  logic [16:0] x;

  rns_processor dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .x);

  typedef struct {
    longint unsigned expv;
    longint          cyc;
  } exp_t;
  exp_t q_exp [$];

  int checks = 0, failures = 0;
  int n_wrap = 0, n_carry = 0, n_corr = 0, n_range = 0, n_b2b = 0;
  longint cycle = 0;
  int issued = 0, received = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint unsigned summand(longint unsigned r, longint unsigned mi);
    longint unsigned mhat = BIG_M / mi;
    for (longint unsigned k = 0; k < mi; k++)
      if ((k * mhat) % mi == r) return k * mhat;
    return 0;
  endfunction

  // Book-keeping of one issued operation.
  function automatic void account(longint unsigned av, longint unsigned bv);
    longint unsigned p = av * bv, sq = 0, sr = 0, s;
    for (int i = 0; i < N; i++) begin
      s   = summand(p % MODS[i], MODS[i]);
      sq += s / MP;
      sr += s % MP;
    end
    if (sq >= 16) n_wrap++;
    if ((sq % 16) * MP + sr >= BIG_M) n_carry++; else n_corr++;
    if (p >= BIG_M) n_range++;
    q_exp.push_back('{expv: p % BIG_M, cyc: cycle});
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      received++;
      if (q_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", x);
      end else begin
        e = q_exp.pop_front();
        if (64'(x) != e.expv || cycle - e.cyc != LAT) begin
          failures++;
          $display("FAIL got %0d after %0d clocks, expected %0d after %0d",
                   x, cycle - e.cyc, e.expv, LAT);
        end
      end
    end
  end

  task automatic issue(input logic [15:0] av, input logic [15:0] bv);
    a = av; b = bv; in_valid = 1'b1;
    account(av, bv);
    issued++;
    @(posedge clk); #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_valid;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    issue(16'd0, 16'd0);
    issue(16'hFFFF, 16'hFFFF);
    issue(16'd1, 16'd80);
    issue(16'd283, 16'd283);          // 80089: just above M
    last_valid = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0; a = 16'($urandom); b = 16'($urandom);
        last_valid = 1'b0;
        @(posedge clk); #1;
      end
      if (last_valid) n_b2b++;
      issue(16'($urandom), ($urandom_range(1) == 0) ? 16'($urandom_range(255)) : 16'($urandom));
      last_valid = 1'b1;
    end
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (received != issued || q_exp.size() != 0) begin
      failures++;
      $display("FAIL issued %0d received %0d", issued, received);
    end
    $display("issued %0d, back-to-back %0d, q wraps %0d, level-3 carries %0d, level-4 corrections %0d, range wraps %0d",
             issued, n_b2b, n_wrap, n_carry, n_corr, n_range);
    if (n_b2b == 0 || n_wrap == 0 || n_carry == 0 || n_corr == 0 || n_range == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
