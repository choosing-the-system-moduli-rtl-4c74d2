// crt_split_rom: CRT summand ROM for one modulus, in the split form used by
// the power-of-two decoder.
//
// For residue digit r of modulus m_i the Chinese Remainder Theorem summand is
//   S_i = (M/m_i) * | r * (M/m_i)^-1 |_m_i ,   0 <= S_i < M.
// With one system modulus equal to 2^K, the ROM stores S_i not as a binary
// number but as the pair (q_i, rho_i) with
//   S_i = q_i * (M/2^K) + rho_i,   0 <= q_i < 2^K,  0 <= rho_i < M/2^K,
// so that the decoder can add the q_i modulo 2^K and the rho_i with a plain
// adder.  The table has 2^W words (W = ceil(log2 MOD)); words for r >= MOD
// hold 0.  Its contents are computed from MOD, BIG_M and K in an initial
// block, i.e. as the initial value of a read-only memory.
//
// Interface: r in; q (K bits) and rho (ceil(log2(M/2^K)) bits) out.
// Timing: registered read, q and rho one clock after r.
// The split storage follows the decoder description; the registered read is
// this design's choice.
module crt_split_rom #(
  parameter int unsigned MOD   = 13,
  parameter int unsigned BIG_M = 80080,
  parameter int unsigned K     = 4,
  localparam int unsigned W     = rns_pkg::bits_for(64'(MOD)),
  localparam int unsigned MP    = BIG_M >> K,
  localparam int unsigned RHO_W = rns_pkg::bits_for(64'(MP)),
  localparam int unsigned DEPTH = 1 << W
) (
  input  logic             clk,
  input  logic [W-1:0]     r,
  output logic [K-1:0]     q,
  output logic [RHO_W-1:0] rho
);

  if (BIG_M % MOD != 0 || BIG_M % (1 << K) != 0) begin : g_bad_cfg
    $error("crt_split_rom: MOD and 2^K must both divide BIG_M");
  end

  logic [K+RHO_W-1:0] rom [DEPTH];

  initial begin
    longint unsigned s;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      s = (i < MOD) ? rns_pkg::crt_term(64'(i), 64'(MOD), 64'(BIG_M)) : 64'd0;
      rom[i] = {K'(s / 64'(MP)), RHO_W'(s % 64'(MP))};
    end
  end

  always_ff @(posedge clk) {q, rho} <= rom[r];

endmodule
