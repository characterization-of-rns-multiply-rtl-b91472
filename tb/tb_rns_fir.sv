// tb_rns_fir: end-to-end test of the RNS FIR filter in its small
// configuration (16-bit dynamic range, 16 taps, base {61, 59, 32}).
//
// It loads a random coefficient mask serially, streams random samples with
// random gaps in x_valid, loads a second mask in the middle of the run and
// streams again. A binary transposed-form model in 64-bit integers predicts
// every output; y_valid must rise exactly two cycles after each accepted
// sample. It also checks, for the first mask, the direct-form sum
// sum_k a(k) x(n-k). Mechanisms counted (each must occur): serial coefficient
// loads, gated-clock edges equal to loads, held (invalid) input cycles,
// negative outputs, zero input samples and zero coefficients.
module tb_rns_fir;
  import rns_pkg::*;
  localparam int unsigned DW = 16;
  localparam int unsigned N  = 16;
  localparam longint      XR = 32;   // |x|, |a| <= XR keeps y inside 16 bits

  int checks = 0, failures = 0;
  int n_coef_loads = 0, n_gclk = 0, n_holds = 0, n_neg = 0, n_zero_x = 0, n_zero_a = 0;
  int n_masks = 0, n_out = 0;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          coef_we = 1'b0, x_valid = 1'b0;
  logic [DW-1:0] coef_in = '0, x_in = '0;
  logic          y_valid;
  logic [DW-1:0] y_out;

  rns_fir #(.DW(DW), .N(N), .P(BASE16_P), .MODULI(BASE16)) dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_in(coef_in),
    .x_valid(x_valid), .x_in(x_in), .y_valid(y_valid), .y_out(y_out));

  always #5 clk = ~clk;
  always @(posedge dut.u_coef.gclk) n_gclk++;

  longint a [N];         // current mask
  longint r [N+1];       // transposed-form model registers, r[N] = 0
  longint hist [N];      // accepted samples, newest first (direct-form check)
  bit     direct_ok = 1'b1;
  // expected-output pipeline: stage 0 = sampled this edge
  bit     pv [3];
  longint pd [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard, evaluated just after every rising edge
  always @(posedge clk) if (rst_n) begin
    bit     take;
    longint xv, direct;
    take = x_valid;
    xv   = longint'($signed(x_in));
    for (int s = 2; s > 0; s--) begin pv[s] = pv[s-1]; pd[s] = pd[s-1]; end
    pv[0] = 1'b0;
    if (take) begin
      for (int k = 0; k < N; k++) r[k] = a[k] * xv + r[k+1];
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xv;
      direct = 0;
      for (int k = 0; k < N; k++) direct += a[k] * hist[k];
      if (direct_ok) begin
        checks++;
        if (direct != r[0]) begin failures++; $display("FAIL model mismatch"); end
      end
      pv[0] = 1'b1;
      pd[0] = r[0];
    end else if (coef_we == 1'b0) n_holds++;
    #1;
    checks++;
    if (y_valid != pv[2]) begin
      failures++;
      $display("FAIL y_valid=%0b exp=%0b at %0t", y_valid, pv[2], $time);
    end else if (pv[2]) begin
      checks++;
      n_out++;
      if (longint'($signed(y_out)) < 0) n_neg++;
      if (longint'($signed(y_out)) != pd[2]) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d exp=%0d", $signed(y_out), pd[2]);
      end
    end
  end

  task automatic load_mask();
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1'b1;
      a[k] = longint'($urandom_range(32'(2 * XR))) - XR;
      if (k == 0 || k == N - 1) a[k] = 0;   // zero tail coefficients
      if (a[k] == 0) n_zero_a++;
      coef_in = DW'(a[k]);
      n_coef_loads++;
    end
    @(negedge clk) coef_we = 1'b0;
    n_masks++;
  endtask

  task automatic stream(input int count);
    int sent;
    sent = 0;
    while (sent < count) begin
      @(negedge clk);
      x_valid = ($urandom_range(3) != 0);
      if (x_valid) begin
        longint v;
        v = longint'($urandom_range(32'(2 * XR))) - XR;
        if ($urandom_range(15) == 0) v = 0;
        if (v == 0) n_zero_x++;
        x_in = DW'(v);
        sent++;
      end
    end
    @(negedge clk) x_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k <= N; k++) r[k] = 0;
    for (int k = 0; k < N; k++) begin a[k] = 0; hist[k] = 0; end
    for (int s = 0; s < 3; s++) begin pv[s] = 0; pd[s] = 0; end
    #12 rst_n = 1'b1;
    load_mask();
    stream(300);
    direct_ok = 1'b0;    // the taps now hold sums made with the old mask
    load_mask();
    stream(300);
    // every mechanism must have happened
    if (n_coef_loads != 2 * N) begin failures++; $display("FAIL coefficient loads %0d", n_coef_loads); end
    checks++;
    if (n_gclk != n_coef_loads) begin failures++; $display("FAIL gated clock edges %0d loads %0d", n_gclk, n_coef_loads); end
    checks++;
    if (n_holds == 0)   begin failures++; $display("FAIL no held cycle"); end
    if (n_neg == 0)     begin failures++; $display("FAIL no negative output"); end
    if (n_zero_x == 0)  begin failures++; $display("FAIL no zero sample"); end
    if (n_zero_a == 0)  begin failures++; $display("FAIL no zero coefficient"); end
    if (n_out != 600)   begin failures++; $display("FAIL outputs %0d", n_out); end
    $display("mechanisms: masks=%0d coef_loads=%0d gclk_edges=%0d holds=%0d negative_outputs=%0d zero_samples=%0d zero_coefs=%0d outputs=%0d",
             n_masks, n_coef_loads, n_gclk, n_holds, n_neg, n_zero_x, n_zero_a, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
