// coef_bank: the N coefficient registers of the RNS filter, each holding the
// P residues of one coefficient a(k). Coefficients are loaded serially at
// filter initialisation: every cycle with load high shifts the chain by one
// place, the new coefficient entering at position N-1, so after N loads the
// first coefficient written sits in a[0] and the last in a[N-1] (write a(0)
// first). The registers are clocked through a clock gate that is open only
// while load is high, so they burn no clock power while the filter runs.
// Asynchronous active-low reset clears all coefficients.
//
// Serial loading and clock gating follow the document; the shift-chain order
// and the reset are this design's choice.
module coef_bank
  import rns_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned P = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  res_t [P-1:0]              coef_in,
  output res_t [N-1:0][P-1:0]       coef
);
  logic gclk;

  clock_gate u_cg (.clk(clk), .en(load), .gclk(gclk));

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) coef <= '0;
    else        coef <= {coef_in, coef[N-1:1]};
  end
endmodule
