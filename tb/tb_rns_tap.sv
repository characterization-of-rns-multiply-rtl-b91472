// tb_rns_tap: drives one filter tap (modulus 61) with random residues and a
// random sample enable, and checks on every clock edge that the register
// loads (x*a + r_in) mod 61 when en is high and holds when en is low. Also
// checks the asynchronous reset.
module tb_rns_tap;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int holds = 0, loads = 0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  res_t x = '0, a = '0, r_in = '0, r;
  int   model;

  rns_tap #(.M(61)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .a(a), .r_in(r_in), .r(r));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (r != '0) begin failures++; $display("FAIL reset r=%0d", r); end
    rst_n = 1'b1;
    model = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      x    = res_t'($urandom_range(60));
      a    = res_t'($urandom_range(60));
      r_in = res_t'($urandom_range(60));
      en   = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) begin model = (int'(x) * int'(a) + int'(r_in)) % 61; loads++; end
      else holds++;
      #1;
      checks++;
      if (int'(r) != model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d en=%0b r=%0d exp=%0d", n, en, r, model);
      end
    end
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
