// crt_vu_decoder: modulo-M summation of the CRT summands when one system
// modulus is a power of two, 2^K.
//
// Each summand arrives split as S_i = q_i*(M/2^K) + rho_i (see
// crt_split_rom).  Then
//   X = | sum S_i |_M = | (M/2^K) * |sum q_i|_2^K  +  sum rho_i |_M ,
// because (M/2^K)*2^K = M.  With N <= 2^K summands, sum rho_i < N*M/2^K <= M,
// so both parts are below M and a single correction finishes the job.
// The four levels:
//   1. q = |sum q_i|_2^K, a K-bit multi-operand adder that simply drops the
//      carries; alongside it r = sum rho_i, a C-bit multi-operand adder
//      (C = ceil(log2 M)).
//   2. A 2^K-word ROM, Y[q] = q*(M/2^K) + 2^C - M.
//   3. A 2-operand adder, {c, Z} = Y + r.  The carry c is set exactly when
//      q*(M/2^K) + r >= M, and then Z already equals X.
//   4. A 2-operand adder, X = Z + M (mod 2^C), which takes back the 2^C - M
//      that level 2 added when there was no carry.
// Levels 1-4 are combinational; X is registered.
//
// Interface: q, rho packed per summand; x out (C bits).  Timing: x one clock
// after q and rho.  The four-level structure, the bus widths and the ROM
// contents follow the decoder description; the carry-save form of the
// level-1 adders (mo_adder, logarithmic depth in N) and the output register
// are this design's choices.
module crt_vu_decoder #(
  parameter int unsigned N     = 5,
  parameter int unsigned BIG_M = 80080,
  parameter int unsigned K     = 4,
  localparam int unsigned MP    = BIG_M >> K,
  localparam int unsigned RHO_W = rns_pkg::bits_for(64'(MP)),
  localparam int unsigned C     = rns_pkg::bits_for(64'(BIG_M))
) (
  input  logic                      clk,
  input  logic [N-1:0][K-1:0]       q,
  input  logic [N-1:0][RHO_W-1:0]   rho,
  output logic [C-1:0]              x
);

  if (N > (1 << K)) begin : g_bad_n
    $error("crt_vu_decoder: needs N <= 2^K so that sum rho_i < M");
  end
  if (BIG_M % (1 << K) != 0) begin : g_bad_m
    $error("crt_vu_decoder: 2^K must divide BIG_M");
  end

  // Level 2 ROM contents.
  logic [C-1:0] y_rom [1 << K];
  initial begin
    for (int unsigned i = 0; i < (1 << K); i++)
      y_rom[i] = C'(64'(i) * 64'(MP) + (64'd1 << C) - 64'(BIG_M));
  end

  logic [K-1:0] q_sum;     // level 1, modulo 2^K
  logic [C-1:0] r_sum;     // level 1, below M
  logic [C-1:0] y;         // level 2
  logic         carry;     // level 3
  logic [C-1:0] z;         // level 3
  logic [C-1:0] x_next;    // level 4

  // Level 1: two carry-save multi-operand adders; the q sum keeps K bits.
  mo_adder #(.N(N), .W(K),     .OW(K)) u_qsum (.ops(q),   .sum(q_sum));
  mo_adder #(.N(N), .W(RHO_W), .OW(C)) u_rsum (.ops(rho), .sum(r_sum));

  always_comb begin
    y            = y_rom[q_sum];
    {carry, z}   = {1'b0, y} + {1'b0, r_sum};
    x_next       = carry ? z : z + C'(BIG_M);
  end

  always_ff @(posedge clk) x <= x_next;

endmodule
