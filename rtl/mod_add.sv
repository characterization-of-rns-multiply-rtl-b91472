// mod_add: modular adder, s = <a + b>_M, the second stage of the RNS
// multiply-add. Both operands must already be residues (a, b < M). The sum is
// formed once and, when it reaches M, M is subtracted: an adder, a comparator
// and a 2:1 multiplexer. For a power-of-two M this reduces to dropping the
// carry. Purely combinational.
//
// The role of the block (a modular adder cascaded after the multiplier) is the
// document's; the one-subtraction structure is the simplest circuit that does
// it and is this design's choice.
module mod_add
  import rns_pkg::*;
#(
  parameter int unsigned M = 61
) (
  input  res_t a,
  input  res_t b,
  output res_t s
);
  logic [RW:0]   sum;
  logic [RW-1:0] diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = RW'(sum - (RW+1)'(M));
    s    = (sum >= (RW+1)'(M)) ? diff : sum[RW-1:0];
  end

  initial assert (M >= 2 && M <= MAXM) else $error("mod_add: modulus %0d out of range", M);
endmodule
