// tb_rns_fir_channel: one RNS channel (modulus 59, 8 taps). Random coefficient
// residues are applied, random input residues are fed with a random sample
// enable, and after every accepted sample the output is compared with the
// direct-form convolution sum_k a(k) x(n-k) mod 59 kept by the testbench. The
// output must be ready one clock edge after the sample.
module tb_rns_fir_channel;
  import rns_pkg::*;
  localparam int unsigned M = 59;
  localparam int unsigned N = 8;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  res_t x = '0, y;
  res_t [N-1:0] coef;
  int hist [N];   // x(n), x(n-1), ...
  int exp;

  rns_fir_channel #(.M(M), .N(N)) dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .coef(coef), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      coef[k] = res_t'($urandom_range(M - 1));
      hist[k] = 0;
    end
    coef[N-1] = '0;  // a zero coefficient exercises the zero path
    #12 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x  = res_t'($urandom_range(M - 1));
      en = ($urandom_range(4) != 0);
      @(posedge clk);
      if (en) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
      end
      exp = 0;
      for (int k = 0; k < N; k++) exp = (exp + int'(coef[k]) * hist[k]) % M;
      #1;
      checks++;
      if (int'(y) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d exp=%0d", n, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
