// rns_cfg_check: reusable checker that runs one rns_processor configuration.
// It drives NOPS random operand pairs of IN_W bits, back to back, and
// compares each result with |a op b|_M worked out here from the moduli, and
// its arrival with the four-clock latency.  It raises done when finished and
// reports its counts on checks and failures.  Used by the workload test.
module rns_cfg_check #(
  parameter int unsigned       N          = 3,
  parameter int unsigned       MODULI [N] = '{8, 5, 7},
  parameter int unsigned       IN_W       = 8,
  parameter rns_pkg::rns_op_e  OP         = rns_pkg::OP_MUL,
  parameter rns_pkg::rns_dec_e DEC        = rns_pkg::DEC_SPLIT,
  parameter int                NOPS       = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import rns_pkg::*;

  function automatic longint unsigned prod();
    longint unsigned p = 1;
    for (int i = 0; i < N; i++) p *= MODULI[i];
    return p;
  endfunction
  localparam longint unsigned BIG_M = prod();
  localparam int unsigned     C     = bits_for(BIG_M);

  logic            in_valid, out_valid;
  logic [IN_W-1:0] a, b;
  logic [C-1:0]    x;

  rns_processor #(.N(N), .MODULI(MODULI), .IN_W(IN_W), .OP(OP), .DEC(DEC)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid, .x
  );

  longint unsigned exp_q [$];
  longint          cyc_q [$];
  longint          cycle;
  int              received;

  always @(posedge clk) begin
    if (!rst_n) cycle <= 0;
    else        cycle <= cycle + 1;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks <= checks + 1;
      received <= received + 1;
      if (exp_q.size() == 0) begin
        failures <= failures + 1;
        $display("FAIL M=%0d unexpected output", BIG_M);
      end else if (64'(x) != exp_q[0] || cycle - cyc_q[0] != 64'(4)) begin
        failures <= failures + 1;
        $display("FAIL M=%0d got %0d after %0d clocks, expected %0d", BIG_M, x,
                 cycle - cyc_q[0], exp_q[0]);
      end
      if (exp_q.size() != 0) begin
        void'(exp_q.pop_front());
        void'(cyc_q.pop_front());
      end
    end
  end

  initial begin
    longint unsigned av, bv, e;
    checks = 0; failures = 0; done = 1'b0; received = 0;
    in_valid = 1'b0; a = '0; b = '0;
    @(posedge rst_n);
    @(posedge clk); #1;
    for (int n = 0; n < NOPS; n++) begin
      av = (n == 0) ? 0 : (n == 1) ? (64'd1 << IN_W) - 1 : 64'(IN_W'($urandom));
      bv = (n == 0) ? 0 : (n == 1) ? (64'd1 << IN_W) - 1 : 64'(IN_W'($urandom));
      case (OP)
        OP_ADD:  e = (av + bv) % BIG_M;
        OP_SUB:  e = (av % BIG_M + BIG_M - bv % BIG_M) % BIG_M;
        default: e = (av * bv) % BIG_M;
      endcase
      a = IN_W'(av); b = IN_W'(bv); in_valid = 1'b1;
      exp_q.push_back(e);
      cyc_q.push_back(cycle);
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (8) @(posedge clk);
    #1;
    if (received != NOPS) begin
      failures = failures + 1;
      $display("FAIL M=%0d received %0d of %0d", BIG_M, received, NOPS);
    end
    done = 1'b1;
  end
endmodule
