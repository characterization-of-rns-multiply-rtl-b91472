// iso_mult: modular multiplier for a prime modulus M by isomorphism, the
// residue counterpart of multiplying by logarithms. The nonzero residues of a
// prime modulus form a cyclic group: every nonzero x is g^i for a generator g
// and an index i in 0..M-2. The product is found as
//   p = g^( <i(x) + i(y)>_(M-1) )
// so the multiplier is two forward look-up tables (residue -> index), one
// modulo-(M-1) index adder and one reverse table (index -> residue). A zero
// operand has no index; it is flagged beside the tables and forces p = 0.
// Purely combinational.
//
// The tables are computed at elaboration from M (smallest primitive root as
// g), so no table file is needed; a synthesis tool turns them into multi-level
// logic. Using look-up tables for the two transformations and an index adder
// follows the document; the choice of generator, the zero flag and the plain
// (unoptimised) tables are this design's own.
module iso_mult
  import rns_pkg::*;
#(
  parameter int unsigned M = 61
) (
  input  res_t x,
  input  res_t y,
  output res_t p
);
  localparam int unsigned G = prim_root(M);
  localparam int unsigned IW = $clog2(M);  // index width (indices < M-1)

  typedef logic [MAXM-1:0][RW-1:0] table_t;

  // Forward table: LOG[x] = i with g^i = x (x = 1..M-1); LOG[0] unused.
  function automatic table_t build_log();
    table_t t;
    int unsigned v;
    t = '0;
    v = 1;
    for (int unsigned i = 0; i < M - 1; i++) begin
      t[v] = RW'(i);
      v = (v * G) % M;
    end
    return t;
  endfunction

  // Reverse table: EXP[i] = g^i mod M (i = 0..M-2).
  function automatic table_t build_exp();
    table_t t;
    int unsigned v;
    t = '0;
    v = 1;
    for (int unsigned i = 0; i < M - 1; i++) begin
      t[i] = RW'(v);
      v = (v * G) % M;
    end
    return t;
  endfunction

  localparam table_t LOG = build_log();
  localparam table_t EXP = build_exp();

  logic [IW-1:0] ix, iy;
  logic [IW:0]   isum;
  logic [IW-1:0] iz;
  logic          zero;

  always_comb begin
    ix   = IW'(LOG[x]);
    iy   = IW'(LOG[y]);
    zero = (x == '0) || (y == '0);
    isum = {1'b0, ix} + {1'b0, iy};
    // index addition modulo M-1
    iz   = (isum >= (IW+1)'(M - 1)) ? IW'(isum - (IW+1)'(M - 1)) : isum[IW-1:0];
    p    = zero ? '0 : EXP[iz];
  end

  initial assert (is_prime(M) && M >= 3 && M < MAXM)
    else $error("iso_mult: modulus %0d is not an odd prime", M);
endmodule
