// tb_madd_dse: runs the RNS multiply-add unit on every dynamic range of the
// design-space sweep, 16 to 48 bits in steps of 4, each with its own base
// chosen by the same rule as the filter's (primes 3..71, at most one power
// of two, 2^d <= M <= 2^(d+2), fewest total bits). Each lane converts random
// operands, multiplies and adds per modulus, converts back, and checks
// Z = X*Y + W.
module tb_madd_dse;
  import rns_pkg::*;
  localparam int L = 9;
  int lc [L], lf [L];
  logic [L-1:0] ld;
  int checks, failures;

  madd_dse_lane #(.DW(16), .P(3), .MODULI({9'd61, 9'd59, 9'd32})) u16 (.checks(lc[0]), .failures(lf[0]), .done(ld[0]));
  madd_dse_lane #(.DW(20), .P(3), .MODULI({9'd256, 9'd71, 9'd61})) u20 (.checks(lc[1]), .failures(lf[1]), .done(ld[1]));
  madd_dse_lane #(.DW(24), .P(4), .MODULI({9'd128, 9'd61, 9'd59, 9'd53})) u24 (.checks(lc[2]), .failures(lf[2]), .done(ld[2]));
  madd_dse_lane #(.DW(28), .P(5), .MODULI({9'd61, 9'd59, 9'd53, 9'd47, 9'd32})) u28 (.checks(lc[3]), .failures(lf[3]), .done(ld[3]));
  madd_dse_lane #(.DW(32), .P(6), .MODULI({9'd61, 9'd59, 9'd53, 9'd32, 9'd31, 9'd29})) u32 (.checks(lc[4]), .failures(lf[4]), .done(ld[4]));
  madd_dse_lane #(.DW(36), .P(6), .MODULI({9'd256, 9'd61, 9'd59, 9'd53, 9'd47, 9'd31})) u36 (.checks(lc[5]), .failures(lf[5]), .done(ld[5]));
  madd_dse_lane #(.DW(40), .P(7), .MODULI({9'd71, 9'd64, 9'd61, 9'd59, 9'd53, 9'd47, 9'd31})) u40 (.checks(lc[6]), .failures(lf[6]), .done(ld[6]));
  madd_dse_lane #(.DW(44), .P(8), .MODULI({9'd71, 9'd61, 9'd59, 9'd53, 9'd47, 9'd32, 9'd31, 9'd29})) u44 (.checks(lc[7]), .failures(lf[7]), .done(ld[7]));
  madd_dse_lane #(.DW(48), .P(BASE48_P), .MODULI(BASE48)) u48 (.checks(lc[8]), .failures(lf[8]), .done(ld[8]));

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (&ld);
    #1;
    checks = 0; failures = 0;
    for (int i = 0; i < L; i++) begin
      checks += lc[i];
      failures += lf[i];
      if (lc[i] == 0) failures++;
      $display("dynamic range %0d bits: checks=%0d failures=%0d", 16 + 4 * i, lc[i], lf[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
