// rns2bin: output converter from P residues to a DW-bit two's complement
// number by the Chinese Remainder Theorem:
//   X = < sum_i M_i * <x_i * M_i^-1>_(m_i) >_M,   M_i = M / m_i
// then X is read as negative (X - M) when it lies in the upper half of the
// range [0, M). The per-channel factors M_i^-1 and the weights M_i are
// constants computed at elaboration. The sum is below P*M, so the final
// modulo-M reduction subtracts j*M for the largest j < P with j*M <= sum,
// found by P-1 parallel comparisons. Purely combinational.
//
// The result is exact when the true value lies in [-2^(DW-1), 2^(DW-1)),
// which the base guarantees since M >= 2^DW. The document specifies only
// that output converters exist; the CRT structure is this design's choice.
module rns2bin
  import rns_pkg::*;
#(
  parameter int unsigned DW = 48,
  parameter int unsigned P  = 9,
  parameter mod_t [P-1:0] MODULI = BASE48
) (
  input  res_t [P-1:0]  r,
  output logic [DW-1:0] x
);
  function automatic wide_t prod_all();
    wide_t p;
    p = 1;
    for (int i = 0; i < P; i++) p = p * wide_t'(MODULI[i]);
    return p;
  endfunction

  localparam wide_t MPROD = prod_all();

  typedef wide_t [P-1:0] wvec_t;

  function automatic wvec_t build_mi();
    wvec_t v;
    for (int i = 0; i < P; i++) v[i] = MPROD / wide_t'(MODULI[i]);
    return v;
  endfunction

  function automatic wvec_t build_inv();
    wvec_t v;
    for (int i = 0; i < P; i++) v[i] = wide_t'(mod_inv(MPROD / wide_t'(MODULI[i]), int'(MODULI[i])));
    return v;
  endfunction

  localparam wvec_t MI  = build_mi();
  localparam wvec_t INV = build_inv();

  wide_t [P-1:0] t;   // <x_i * M_i^-1>_(m_i)
  wide_t         sum;
  wide_t         red;  // sum reduced modulo M
  wide_t         sub;

  always_comb begin
    sum = '0;
    for (int i = 0; i < P; i++) begin
      t[i] = 64'((16'(r[i]) * 16'(INV[i])) % 16'(MODULI[i]));
      sum  = sum + t[i] * MI[i];
    end
    sub = '0;
    for (int j = 1; j < P; j++)
      if (sum >= wide_t'(j) * MPROD) sub = wide_t'(j) * MPROD;
    red = sum - sub;
    // upper half of [0, M) holds the negative numbers
    if (red > (MPROD - 1) / 2) x = DW'(red - MPROD);
    else                       x = DW'(red);
  end

  initial assert (MPROD >= (wide_t'(1) << DW))
    else $error("rns2bin: base product below 2^DW");
endmodule
