// rns_fir_channel: an N-tap FIR filter in transposed form working on the
// residues of one modulus M. The RNS filter is P of these side by side, one
// per modulus, sharing nothing but the sample enable.
//
// Tap k holds r_k and, for every input sample (en high), loads
//   r_k <= <x * a(k) + r_(k+1)>_M,   r_N = 0
// so after sample x(n) has been taken, y = r_0 = <sum_k a(k) x(n-k)>_M.
// y is therefore available one clock edge after the sample is presented with
// en high. coef[k] is the residue of a(k); it is expected to stay constant
// while filtering. Asynchronous active-low reset clears every tap.
module rns_fir_channel
  import rns_pkg::*;
#(
  parameter int unsigned M = 61,
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  res_t           x,
  input  res_t [N-1:0]   coef,
  output res_t           y
);
  res_t [N:0] r;  // r[N] is the constant zero fed to the last tap

  assign r[N] = '0;

  for (genvar k = 0; k < N; k++) begin : g_tap
    rns_tap #(.M(M)) u_tap (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .x    (x),
      .a    (coef[k]),
      .r_in (r[k+1]),
      .r    (r[k])
    );
  end

  assign y = r[0];
endmodule
