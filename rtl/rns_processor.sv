// rns_processor: four-stage residue number system (RNS) arithmetic processor.
//
// Two binary operands A and B are converted to residue digits with respect
// to N pairwise relatively prime moduli, one operation (add, subtract or
// multiply) is carried out independently and carry-free on each digit by a
// ROM-based processor per modulus, and the result is converted back to
// binary with the Chinese Remainder Theorem (CRT).  The output is
//   X = | A op B |_M ,   M = m_1 * m_2 * ... * m_N .
// Stages (one register each, so four clocks of latency):
//   1. rns_fwd_conv per modulus and operand: binary to residue.
//   2. rns_mod_proc per modulus: 2^(2w)-word ROM giving |a op b|_m_i.
//   3. CRT summand ROMs per modulus.
//   4. Modulo-M summation of the summands.
// Stages 3 and 4 come in two forms, chosen by DEC:
//   DEC_SPLIT (default): one modulus is 2^K.  crt_split_rom stores each
//     summand as q_i*(M/2^K) + rho_i and crt_vu_decoder adds them with a
//     mod 2^K adder, a 2^K-word ROM and two 2-operand adders.  Needs N <= 2^K.
//   DEC_TSUM: crt_term_rom gives t_i and crt_modm_adder adds the t_i modulo
//     M; any relatively prime moduli set works.
//   DEC_EAC: the moduli multiply to exactly M = 2^c - 1; crt_term_rom gives
//     t_i and crt_eac_adder adds them with end-around carry, a plain
//     n-operand adder with no comparison against M.
//
// Default configuration: moduli {16, 5, 7, 11, 13}, M = 80080 >= 2^16 - 1, so
// any 16-bit result is represented exactly; processor ROMs hold 3456 bits
// and split summand ROMs 1088 bits.  The moduli set is this design's own
// choice made under the stated rules (relatively prime, product at least
// 2^16 - 1, one modulus a power of two, N <= 2^K).
//
// Interface: in_valid with a and b (IN_W-bit unsigned); out_valid with x
// (ceil(log2 M) bits).  One operation per clock, out_valid four clocks after
// in_valid.  rst_n is an asynchronous active-low reset of the valid pipeline.
// The four stages, the ROM organisation and the three decoder forms follow
// the method; the stage registers, the valid bit and the operation fixed
// per build (OP) are this design's choices.
module rns_processor #(
  parameter int unsigned      N      = 5,
  parameter int unsigned      MODULI [N] = '{16, 5, 7, 11, 13},
  parameter int unsigned      IN_W   = 16,
  parameter rns_pkg::rns_op_e OP     = rns_pkg::OP_MUL,
  parameter rns_pkg::rns_dec_e DEC   = rns_pkg::DEC_SPLIT,
  localparam int unsigned     LAT    = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [IN_W-1:0] a,
  input  logic [IN_W-1:0] b,
  output logic            out_valid,
  output logic [rns_pkg::bits_for(prod_moduli())-1:0] x
);

  // ---------------------------------------------------------------------
  // Configuration derived from the moduli.
  // ---------------------------------------------------------------------
  function automatic longint unsigned prod_moduli();
    longint unsigned p = 1;
    for (int i = 0; i < N; i++) p *= 64'(MODULI[i]);
    return p;
  endfunction

  function automatic int unsigned max_res_bits();
    int unsigned w = 1;
    for (int i = 0; i < N; i++)
      if (rns_pkg::bits_for(64'(MODULI[i])) > w) w = rns_pkg::bits_for(64'(MODULI[i]));
    return w;
  endfunction

  // Exponent of the largest power-of-two modulus, 0 if there is none.
  function automatic int unsigned pow2_exp();
    int unsigned k = 0;
    for (int i = 0; i < N; i++)
      if (MODULI[i] > 1 && (MODULI[i] & (MODULI[i] - 1)) == 0)
        if ($clog2(MODULI[i]) > k) k = $clog2(MODULI[i]);
    return k;
  endfunction

  function automatic bit moduli_coprime();
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (rns_pkg::gcd(64'(MODULI[i]), 64'(MODULI[j])) != 1) return 1'b0;
    return 1'b1;
  endfunction

  localparam longint unsigned BIG_M = prod_moduli();
  localparam int unsigned     C     = rns_pkg::bits_for(BIG_M);
  localparam int unsigned     RW    = max_res_bits();
  localparam int unsigned     K     = pow2_exp();

  if (!moduli_coprime()) begin : g_bad_moduli
    $error("rns_processor: moduli must be pairwise relatively prime");
  end
  if (BIG_M >= (64'd1 << 32)) begin : g_bad_range
    $error("rns_processor: M must fit in 32 bits");
  end

  // ---------------------------------------------------------------------
  // Valid pipeline.
  // ---------------------------------------------------------------------
  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], in_valid};
  assign out_valid = vld[LAT-1];

  // ---------------------------------------------------------------------
  // Stages 1 and 2: residue conversion and per-modulus processors.
  // ---------------------------------------------------------------------
  logic [N-1:0][RW-1:0] res_p;   // stage-2 results, zero-extended

  for (genvar i = 0; i < N; i++) begin : g_ch
    localparam int unsigned MI = MODULI[i];
    localparam int unsigned WI = rns_pkg::bits_for(64'(MI));
    logic [WI-1:0] ra, rb, rp;

    rns_fwd_conv #(.MOD(MI), .IN_W(IN_W)) u_conv_a (.clk, .x(a), .r(ra));
    rns_fwd_conv #(.MOD(MI), .IN_W(IN_W)) u_conv_b (.clk, .x(b), .r(rb));
    rns_mod_proc #(.MOD(MI), .OP(OP))     u_proc   (.clk, .a(ra), .b(rb), .y(rp));

    assign res_p[i] = RW'(rp);
  end

  // ---------------------------------------------------------------------
  // Stages 3 and 4: CRT decoder.
  // ---------------------------------------------------------------------
  if (DEC == rns_pkg::DEC_SPLIT) begin : g_split
    localparam int unsigned MP    = 32'(BIG_M >> K);
    localparam int unsigned RHO_W = rns_pkg::bits_for(64'(MP));
    logic [N-1:0][K-1:0]     q;
    logic [N-1:0][RHO_W-1:0] rho;

    if (K == 0) begin : g_no_pow2
      $error("rns_processor: DEC_SPLIT needs one modulus equal to 2^K");
    end

    for (genvar i = 0; i < N; i++) begin : g_rom
      localparam int unsigned MI = MODULI[i];
      localparam int unsigned WI = rns_pkg::bits_for(64'(MI));
      crt_split_rom #(.MOD(MI), .BIG_M(32'(BIG_M)), .K(K)) u_rom (
        .clk, .r(res_p[i][WI-1:0]), .q(q[i]), .rho(rho[i])
      );
    end

    crt_vu_decoder #(.N(N), .BIG_M(32'(BIG_M)), .K(K)) u_dec (
      .clk, .q, .rho, .x
    );
  end else begin : g_tsum
    logic [N-1:0][C-1:0] t;

    for (genvar i = 0; i < N; i++) begin : g_rom
      localparam int unsigned MI = MODULI[i];
      localparam int unsigned WI = rns_pkg::bits_for(64'(MI));
      localparam int unsigned LI = rns_pkg::bits_for(64'(BIG_M / MI) * 64'(MI - 1) + 64'd1);
      logic [LI-1:0] ti;
      crt_term_rom #(.MOD(MI), .BIG_M(32'(BIG_M))) u_rom (
        .clk, .r(res_p[i][WI-1:0]), .t(ti)
      );
      assign t[i] = C'(ti);
    end

    if (DEC == rns_pkg::DEC_EAC) begin : g_eac
      if (BIG_M != (64'd1 << C) - 1) begin : g_bad_m
        $error("rns_processor: DEC_EAC needs M = 2^c - 1");
      end
      crt_eac_adder #(.N(N), .C(C)) u_add (.clk, .t, .x);
    end else begin : g_modm
      crt_modm_adder #(.N(N), .BIG_M(32'(BIG_M))) u_add (.clk, .t, .x);
    end
  end

endmodule
