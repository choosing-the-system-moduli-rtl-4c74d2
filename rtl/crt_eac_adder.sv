// crt_eac_adder: n-operand adder modulo M = 2^C - 1 (end-around carry).
//
// When the moduli are chosen so that their product is exactly 2^C - 1, the
// modulo-M summation of the CRT terms needs no comparison with M: since
// 2^C = 1 (mod M), the bits of the sum above position C can be added back
// at the bottom.  The N terms t_i (each below M) are added by a carry-save
// multi-operand adder (mo_adder) into a raw sum S of at most 2C bits; two
// end-around folds lo + hi bring it to at most 2^C - 1, and the one
// remaining non-canonical value, 2^C - 1 itself (the second representation
// of zero), is mapped to 0.
//
// Interface: t packed per term (C bits each); x out (C bits).  Timing: x one
// clock after t.  Using a plain multi-operand adder for the case M = 2^c - 1
// follows the choice of moduli described for this case; the end-around-carry
// form of that adder and the output register are this design's choices.
module crt_eac_adder #(
  parameter int unsigned N = 3,
  parameter int unsigned C = 8,
  localparam int unsigned SW = 2 * C
) (
  input  logic                clk,
  input  logic [N-1:0][C-1:0] t,
  output logic [C-1:0]        x
);

  if (N >= (1 << C)) begin : g_bad_n
    $error("crt_eac_adder: needs N < 2^C so that two folds are enough");
  end

  logic [SW-1:0] sum;
  logic [C:0]    fold1;
  logic [C-1:0]  fold2;
  logic [C-1:0]  x_next;

  mo_adder #(.N(N), .W(C), .OW(SW)) u_sum (.ops(t), .sum(sum));

  always_comb begin
    fold1  = {1'b0, sum[C-1:0]} + {1'b0, sum[SW-1:C]};
    fold2  = fold1[C-1:0] + C'(fold1[C]);
    x_next = (&fold2) ? '0 : fold2;
  end

  always_ff @(posedge clk) x <= x_next;

endmodule
