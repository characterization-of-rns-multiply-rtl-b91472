// rns_madd: fused multiply-add for one modulus of the RNS base,
//   z = <x * y + w>_M
// with x, y, w residues (< M). For a prime modulus it cascades an isomorphic
// multiplier (iso_mult) and a modular adder (mod_add), as the document builds
// its RNS multiply-add. For the one power-of-two modulus a base may hold,
// where the isomorphism does not apply, the product and sum are formed in
// binary and truncated to log2(M) bits (this design's choice; the document
// only says a base may hold one such modulus). Purely combinational.
module rns_madd
  import rns_pkg::*;
#(
  parameter int unsigned M = 61
) (
  input  res_t x,
  input  res_t y,
  input  res_t w,
  output res_t z
);
  if (is_pow2(M)) begin : g_pow2
    localparam int unsigned K = $clog2(M);
    logic [K-1:0] sum;
    always_comb begin
      sum = K'(x * y) + K'(w);   // only the low K bits are kept
      z   = RW'(sum);
    end
  end else if (is_prime(M)) begin : g_prime
    res_t prod;
    iso_mult #(.M(M)) u_mul (.x(x), .y(y), .p(prod));
    mod_add  #(.M(M)) u_add (.a(prod), .b(w), .s(z));
  end else begin : g_bad
    $error("rns_madd: modulus must be a prime or a power of two");
  end
endmodule
