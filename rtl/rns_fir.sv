// rns_fir: N-tap FIR filter y(n) = sum_(k=0..N-1) a(k) x(n-k) computed in a
// residue number system (RNS). Binary samples are split into P residues by an
// input converter, filtered by P independent transposed-form filters (one per
// modulus, every tap a modular multiply-add with an isomorphic multiplier),
// and joined back into binary by a Chinese-Remainder output converter. The
// narrow, carry-free channels are what make the RNS taps small and fast.
//
// Interface (all values DW-bit two's complement, asynchronous active-low
// reset, one clock):
//   coef_we/coef_in  serial coefficient load: one coefficient per cycle with
//                    coef_we high, a(0) first, N writes in all. The
//                    coefficient registers are clock-gated and only clocked
//                    while coef_we is high.
//   x_valid/x_in     input sample, taken on the rising edge when x_valid is
//                    high; with x_valid low the filter holds its state.
//   y_valid/y_out    output sample: the sample taken at edge t gives y_out,
//                    with y_valid high, right after edge t+2 (two cycles of
//                    latency: input converter register, tap registers,
//                    output converter register). One sample per cycle.
// The output is exact while the true result lies in [-2^(DW-1), 2^(DW-1)).
//
// The defaults are the document's large filter: 48-bit dynamic range and 64
// taps. The RNS base (64, 61, 59, 53, 47, 43, 31, 29, 13) is chosen here by the
// document's rule (primes 3..71, at most one power of two, 2^48 <= M <= 2^50)
// with fewest total bits as the cost. The small filter is DW = 16, N = 16,
// P = 3, MODULI = BASE16. Pipeline registers around the converters are this
// design's choice.
module rns_fir
  import rns_pkg::*;
#(
  parameter int unsigned DW = 48,
  parameter int unsigned N  = 64,
  parameter int unsigned P  = BASE48_P,
  parameter mod_t [P-1:0] MODULI = BASE48
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          coef_we,
  input  logic [DW-1:0] coef_in,
  input  logic          x_valid,
  input  logic [DW-1:0] x_in,
  output logic          y_valid,
  output logic [DW-1:0] y_out
);
  // ---- coefficient path: convert, then shift into the clock-gated bank
  res_t [P-1:0]        coef_res;
  res_t [N-1:0][P-1:0] coef;

  bin2rns #(.DW(DW), .P(P), .MODULI(MODULI)) u_coef_conv (.x(coef_in), .r(coef_res));

  coef_bank #(.N(N), .P(P)) u_coef (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (coef_we),
    .coef_in(coef_res),
    .coef   (coef)
  );

  // ---- input converter and its register
  res_t [P-1:0] x_res, x_q;
  logic         v1, v2;

  bin2rns #(.DW(DW), .P(P), .MODULI(MODULI)) u_in_conv (.x(x_in), .r(x_res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      v1  <= 1'b0;
    end else begin
      v1 <= x_valid;
      if (x_valid) x_q <= x_res;
    end
  end

  // ---- P parallel channel filters
  res_t [P-1:0] y_res;

  for (genvar i = 0; i < P; i++) begin : g_ch
    res_t [N-1:0] ch_coef;
    for (genvar k = 0; k < N; k++) begin : g_k
      assign ch_coef[k] = coef[k][i];
    end

    rns_fir_channel #(.M(int'(MODULI[i])), .N(N)) u_ch (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (v1),
      .x    (x_q[i]),
      .coef (ch_coef),
      .y    (y_res[i])
    );
  end

  // ---- output converter and its register
  logic [DW-1:0] y_bin;

  rns2bin #(.DW(DW), .P(P), .MODULI(MODULI)) u_out_conv (.r(y_res), .x(y_bin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2      <= 1'b0;
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      v2      <= v1;
      y_valid <= v2;
      if (v2) y_out <= y_bin;
    end
  end
endmodule
