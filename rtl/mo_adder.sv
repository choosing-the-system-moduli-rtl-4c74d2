// mo_adder: multi-operand adder built as a carry-save (3:2) tree.
//
// Adds N unsigned operands of W bits into an OW-bit sum (modulo 2^OW, so a
// caller that wants the sum modulo 2^K simply sets OW = K).  Each tree level
// takes the operands three at a time through a row of full adders, which
// turns three numbers into a sum word and a carry word (shifted left by
// one), and passes any one or two leftover operands through.  The operand
// count shrinks by about a third per level, so after ceil(log_1.5(N/2))
// levels two words remain and a single carry-propagate adder finishes.  The
// delay therefore grows with log N rather than N.
//
// Interface: ops packed per operand; sum out.  Purely combinational.  The
// logarithmic-depth multi-operand adder is what the decoder's first level
// calls for; the carry-save form is this design's choice of such an adder.
module mo_adder #(
  parameter int unsigned N  = 5,
  parameter int unsigned W  = 13,
  parameter int unsigned OW = 16
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [OW-1:0]       sum
);

  // Operands left after l levels of 3:2 compression.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned c = N;
    for (int unsigned i = 0; i < l; i++) c = 2 * (c / 3) + c % 3;
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned l = 0;
    while (count_at(l) > 2) l++;
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT = count_at(l);
    logic [OW-1:0] v [CNT];

    if (l == 0) begin : g_in
      for (genvar i = 0; i < CNT; i++) begin : g_op
        assign v[i] = OW'(ops[i]);
      end
    end else begin : g_csa
      localparam int unsigned PC = count_at(l - 1);
      localparam int unsigned G  = PC / 3;
      for (genvar g = 0; g < G; g++) begin : g_fa
        logic [OW-1:0] x, y, z;
        assign x = g_lvl[l-1].v[3*g];
        assign y = g_lvl[l-1].v[3*g+1];
        assign z = g_lvl[l-1].v[3*g+2];
        assign v[2*g]   = x ^ y ^ z;
        assign v[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar r = 0; r < PC % 3; r++) begin : g_pass
        assign v[2*G+r] = g_lvl[l-1].v[3*G+r];
      end
    end
  end

  if (count_at(LEVELS) == 1) begin : g_one
    assign sum = g_lvl[LEVELS].v[0];
  end else begin : g_two
    assign sum = g_lvl[LEVELS].v[0] + g_lvl[LEVELS].v[1];
  end

endmodule
