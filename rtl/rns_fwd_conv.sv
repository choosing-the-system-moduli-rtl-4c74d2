// rns_fwd_conv: binary-to-residue converter for one modulus (first stage of
// the RNS processor).
//
// Computes r = |x|_MOD for an IN_W-bit unsigned x.  The bits of x are folded
// in from the most significant end (Horner's rule): acc = 2*acc + x[j],
// followed by one conditional subtraction of MOD, so acc stays below MOD
// after every step.  This is a chain of IN_W small compare-and-subtract
// cells, each only clog2(MOD)+1 bits wide.  The residue is registered.
//
// Interface: x in, r out (W = clog2(MOD) bits).  Timing: r is valid one
// clock after x.  The conversion method is this design's own choice; the
// stage itself (binary X to its residue digits) is the first stage of the
// four-stage RNS architecture.
module rns_fwd_conv #(
  parameter int unsigned MOD  = 13,
  parameter int unsigned IN_W = 16,
  localparam int unsigned W   = rns_pkg::bits_for(64'(MOD))
) (
  input  logic            clk,
  input  logic [IN_W-1:0] x,
  output logic [W-1:0]    r
);

  if (MOD < 2) begin : g_bad_mod
    $error("rns_fwd_conv: MOD must be at least 2");
  end

  logic [W-1:0] res;

  always_comb begin
    logic [W:0] acc;
    acc = '0;
    for (int j = IN_W - 1; j >= 0; j--) begin
      acc = {acc[W-1:0], x[j]};
      if (acc >= (W+1)'(MOD)) acc = acc - (W+1)'(MOD);
    end
    res = acc[W-1:0];
  end

  always_ff @(posedge clk) r <= res;

endmodule
