// crt_term_rom: t-ROM of the third stage, one per modulus.
//
// Maps residue digit r of modulus m_i to the CRT summand
//   t_i = (M/m_i) * | r * (M/m_i)^-1 |_m_i ,
// the term that the fourth stage adds modulo M.  The table has 2^W words
// (W = ceil(log2 MOD)) of L bits, where L = ceil(log2(max t_i + 1)) is the
// word length l_i of the ROM-size count; words for r >= MOD hold 0.  It is
// computed from MOD and BIG_M in an initial block, i.e. as the initial
// value of a read-only memory.
//
// Interface: r in, t out.  Timing: registered read, t one clock after r.
// The table contents follow the CRT; the registered read is this design's
// choice.
module crt_term_rom #(
  parameter int unsigned MOD   = 13,
  parameter int unsigned BIG_M = 80080,
  localparam int unsigned W     = rns_pkg::bits_for(64'(MOD)),
  localparam int unsigned L     = rns_pkg::bits_for(64'(BIG_M / MOD) * 64'(MOD - 1) + 64'd1),
  localparam int unsigned DEPTH = 1 << W
) (
  input  logic         clk,
  input  logic [W-1:0] r,
  output logic [L-1:0] t
);

  if (BIG_M % MOD != 0) begin : g_bad_cfg
    $error("crt_term_rom: MOD must divide BIG_M");
  end

  logic [L-1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++)
      rom[i] = (i < MOD) ? L'(rns_pkg::crt_term(64'(i), 64'(MOD), 64'(BIG_M))) : '0;
  end

  always_ff @(posedge clk) t <= rom[r];

endmodule
