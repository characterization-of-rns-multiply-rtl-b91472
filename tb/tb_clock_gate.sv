// tb_clock_gate: checks the clock gate. With en held low the gated clock must
// stay low; with en high it must follow the clock; a pulse on en while the
// clock is high must not reach the gated clock (no glitch). Rising edges of
// gclk are counted against the number of enabled cycles.
module tb_clock_gate;
  int checks = 0, failures = 0;
  int gedges = 0;

  logic clk = 1'b0, en = 1'b0, gclk;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // gated: 10 cycles, en low
    repeat (10) begin
      @(posedge clk); #1;
      expect_eq("gclk low while gated", int'(gclk), 0);
    end
    expect_eq("edges while gated", gedges, 0);
    // enabled: 7 cycles
    @(negedge clk) en = 1'b1;
    repeat (7) begin
      @(posedge clk); #1;
      expect_eq("gclk high while enabled", int'(gclk), 1);
    end
    @(negedge clk) en = 1'b0;
    expect_eq("edges while enabled", gedges, 7);
    // glitch test: pulse en only while clk is high
    repeat (5) begin
      @(posedge clk); #1 en = 1'b1; #1;
      expect_eq("no glitch while en pulses", int'(gclk), 0);
      #1 en = 1'b0; #1;
      expect_eq("no glitch after en pulse", int'(gclk), 0);
    end
    @(negedge clk);
    expect_eq("edges after glitch test", gedges, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
