// rns_pkg: shared types and constant functions of the RNS arithmetic processor.
//
// The residue number system (RNS) represents an integer X by its residues
// r_i = |X|_m_i with respect to a set of pairwise relatively prime moduli
// m_1..m_n.  Every ROM in the design is computed from the moduli when it is
// initialised, so the functions here are used only on constants: a modular
// inverse, the greatest common divisor, a ceiling log2 and the CRT summand
// (M/m_i)*|r * (M/m_i)^-1|_m_i.  Nothing here has a timing of its own.
package rns_pkg;

  // Arithmetic operation carried out by the per-modulus processors.  The
  // processors are tables, so the operation is fixed when the ROM is filled.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } rns_op_e;

  // How the residue-to-binary conversion is built.
  //   DEC_SPLIT : one modulus is 2^k; summands are stored as q_i*(M/2^k)+rho_i
  //               and added by the four-level decoder (mod 2^k adder, small
  //               ROM, two 2-operand adders).
  //   DEC_TSUM  : t-ROMs followed by a general modulo-M multi-operand adder.
  //   DEC_EAC   : the moduli multiply to exactly M = 2^c - 1; t-ROMs followed
  //               by an n-operand adder with end-around carry.
  typedef enum logic [1:0] {
    DEC_SPLIT = 2'd0,
    DEC_TSUM  = 2'd1,
    DEC_EAC   = 2'd2
  } rns_dec_e;

  // Number of bits needed to hold the values 0..v-1 (at least 1).
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b = 1;
    while ((64'd1 << b) < v) b++;
    return b;
  endfunction

  function automatic longint unsigned gcd(longint unsigned a, longint unsigned b);
    longint unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Multiplicative inverse of a modulo m (m > 1, gcd(a, m) = 1); 0 if none.
  function automatic longint unsigned modinv(longint unsigned a, longint unsigned m);
    for (longint unsigned x = 1; x < m; x++)
      if (((a % m) * x) % m == 1) return x;
    return 0;
  endfunction

  // CRT summand of residue digit r for the modulus mi of a system whose
  // dynamic range is big_m:  t = (M/mi) * | r * (M/mi)^-1 |_mi.
  function automatic longint unsigned crt_term(longint unsigned r, longint unsigned mi,
                                               longint unsigned big_m);
    longint unsigned mhat = big_m / mi;
    longint unsigned inv  = (mi == 1) ? 0 : modinv(mhat, mi);
    return mhat * ((r * inv) % mi);
  endfunction

  // Result of one processor table entry: |a op b|_m.
  function automatic longint unsigned mod_op(rns_op_e op, longint unsigned a,
                                             longint unsigned b, longint unsigned m);
    case (op)
      OP_ADD:  return (a + b) % m;
      OP_SUB:  return (a + m - (b % m)) % m;
      default: return (a * b) % m;
    endcase
  endfunction

endpackage
