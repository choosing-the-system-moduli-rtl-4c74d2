// rns_mod_proc: processor "i mod m_i", one ROM-based residue arithmetic unit.
//
// The two operand residues a and b (each W = ceil(log2 MOD) bits) are
// concatenated into a 2W-bit address of a table holding |a op b|_MOD, so
// the table has 2^(2W) words of W bits, 2^(2W)*W bits in total.  The table
// contents are computed from OP (add, subtract or multiply) in an initial
// block, i.e. as the initial value of a read-only memory; addresses
// whose a or b is not a valid residue (>= MOD) hold 0.  The read is
// registered, as in a synchronous ROM.
//
// Interface: a, b in; y out.  Timing: y = |a op b|_MOD one clock after a, b.
// The table organisation and its size follow the processor description; the
// registered read and the fixed per-instance operation are this design's
// choices.
module rns_mod_proc #(
  parameter int unsigned    MOD = 13,
  parameter rns_pkg::rns_op_e OP = rns_pkg::OP_MUL,
  localparam int unsigned   W   = rns_pkg::bits_for(64'(MOD)),
  localparam int unsigned   DEPTH = 1 << (2 * W)
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] rom [DEPTH];

  initial begin
    longint unsigned ea, eb;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      ea = 64'(i) >> W;
      eb = 64'(i) & ((64'd1 << W) - 1);
      rom[i] = (ea < 64'(MOD) && eb < 64'(MOD)) ? W'(rns_pkg::mod_op(OP, ea, eb, 64'(MOD))) : '0;
    end
  end

  always_ff @(posedge clk) y <= rom[{a, b}];

endmodule
