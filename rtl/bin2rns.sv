// bin2rns: input converter from a DW-bit two's complement number to its P
// residues, x_i = <X>_(m_i), a negative X being represented by M + X.
//
// Each residue is a weighted sum of the input bits: bit j weighs <2^j>_m, and
// the sign bit, whose weight in two's complement is -2^(DW-1), weighs
// <-2^(DW-1)>_m = m - <2^(DW-1)>_m. The sum of the selected weights is below
// DW*m and one final reduction modulo the constant m yields the residue. The
// weights are constants computed at elaboration. Purely combinational.
//
// The document specifies only that input converters exist; this bit-weight
// structure is this design's choice of the simplest converter.
module bin2rns
  import rns_pkg::*;
#(
  parameter int unsigned DW = 48,
  parameter int unsigned P  = 9,
  parameter mod_t [P-1:0] MODULI = BASE48
) (
  input  logic [DW-1:0] x,
  output res_t [P-1:0]  r
);
  localparam int unsigned SW = $clog2(DW * MAXM) + 1;  // weighted-sum width

  typedef res_t [DW-1:0] wtab_t;

  // Weights <2^j>_m of the input bits for modulus m; the sign bit carries
  // -2^(DW-1).
  function automatic wtab_t build_weights(input int unsigned m);
    wtab_t w;
    int unsigned v;
    v = 1 % m;
    for (int unsigned j = 0; j < DW; j++) begin
      w[j] = RW'(v);
      v = (2 * v) % m;
    end
    w[DW-1] = RW'((m - int'(w[DW-1])) % m);
    return w;
  endfunction

  for (genvar i = 0; i < P; i++) begin : g_ch
    localparam int unsigned MI  = int'(MODULI[i]);
    localparam wtab_t       WGT = build_weights(MI);

    logic [SW-1:0] acc;

    always_comb begin
      acc = '0;
      for (int j = 0; j < DW; j++)
        if (x[j]) acc = acc + SW'(WGT[j]);
      r[i] = RW'(acc % SW'(MI));
    end
  end
endmodule
