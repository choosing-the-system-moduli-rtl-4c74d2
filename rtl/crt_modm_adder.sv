// crt_modm_adder: general modulo-M adder of the fourth stage.
//
// Adds the N CRT terms t_i (each below M) and reduces the sum modulo M:
//   X = | sum t_i |_M .
// The raw sum S (a carry-save multi-operand adder, mo_adder) is below N*M.
// It is compared in parallel with every multiple j*M, j = 1..N-1; the
// largest multiple not above S is subtracted.  This works for any moduli
// set, including one with no power of two, at the cost of N-1 wide
// comparators and a final subtractor.
//
// Interface: t packed per term (C = ceil(log2 M) bits each); x out (C bits).
// Timing: x one clock after t.  The function (a modulo-M adder of the t's)
// is the fourth stage of the architecture; the compare-and-subtract
// reduction is this design's own, simplest, choice.
module crt_modm_adder #(
  parameter int unsigned N     = 5,
  parameter int unsigned BIG_M = 80080,
  localparam int unsigned C     = rns_pkg::bits_for(64'(BIG_M)),
  localparam int unsigned SW    = rns_pkg::bits_for(64'(N) * 64'(BIG_M))
) (
  input  logic                clk,
  input  logic [N-1:0][C-1:0] t,
  output logic [C-1:0]        x
);

  logic [SW-1:0] sum;
  logic [SW-1:0] sub;
  logic [C-1:0]  x_next;

  mo_adder #(.N(N), .W(C), .OW(SW)) u_sum (.ops(t), .sum(sum));

  always_comb begin
    sub = '0;
    for (int j = 1; j < N; j++)
      if (sum >= SW'(64'(j) * 64'(BIG_M))) sub = SW'(64'(j) * 64'(BIG_M));
    x_next = C'(sum - sub);
  end

  always_ff @(posedge clk) x <= x_next;

endmodule
