// rns_tap: one tap of a transposed-form FIR filter in one RNS channel: a
// modular multiply-add followed by a register,
//   r <= <x * a + r_in>_M      when en is high (one new input sample)
// where x is the current input residue broadcast to every tap, a the tap's
// coefficient residue and r_in the register of the next tap (zero for the
// last tap). The register updates on the rising clock edge when en is high,
// holds otherwise, and clears on an asynchronous active-low reset.
// The tap structure (multiply-add plus register) follows the document; the
// sample-enable and reset are this design's choice.
module rns_tap
  import rns_pkg::*;
#(
  parameter int unsigned M = 61
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  res_t x,
  input  res_t a,
  input  res_t r_in,
  output res_t r
);
  res_t z;

  rns_madd #(.M(M)) u_madd (.x(x), .y(a), .w(r_in), .z(z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  r <= '0;
    else if (en) r <= z;
  end
endmodule
