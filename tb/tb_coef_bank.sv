// tb_coef_bank: loads 8 random coefficients (3 residues each) serially into
// the coefficient bank and checks that the first one written ends in
// position 0 and the last in position 7; then runs with load low and random
// coef_in and checks that nothing changes (clocks gated off); then reloads a
// second set and checks the new contents; finally checks the reset.
module tb_coef_bank;
  import rns_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned P = 3;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  res_t [P-1:0]        coef_in = '0;
  res_t [N-1:0][P-1:0] coef, ref_c;

  coef_bank #(.N(N), .P(P)) dut (.clk(clk), .rst_n(rst_n), .load(load), .coef_in(coef_in), .coef(coef));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (coef[k] != ref_c[k]) begin
        failures++;
        $display("FAIL %s k=%0d got=%h exp=%h", what, k, coef[k], ref_c[k]);
      end
    end
  endtask

  task automatic load_set();
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      load = 1'b1;
      for (int i = 0; i < P; i++) coef_in[i] = res_t'($urandom());
      ref_c[k] = coef_in;
    end
    @(negedge clk) load = 1'b0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_c = '0;
    #12;
    compare("reset");
    rst_n = 1'b1;
    load_set();
    compare("first load");
    repeat (20) begin
      @(negedge clk) for (int i = 0; i < P; i++) coef_in[i] = res_t'($urandom());
    end
    compare("hold while gated");
    load_set();
    compare("second load");
    rst_n = 1'b0; ref_c = '0; #1;
    compare("async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
