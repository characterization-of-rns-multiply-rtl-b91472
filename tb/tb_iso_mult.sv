// tb_iso_mult: exhaustive check of the isomorphic multiplier for the primes
// 3, 13, 61 and 71: every pair x, y (zero included) is applied and p is
// compared with x*y mod M computed directly in the testbench.
module tb_iso_mult;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int zeros = 0;

  res_t x, y, p3, p13, p61, p71;
  iso_mult #(.M(3))  u3  (.x(x), .y(y), .p(p3));
  iso_mult #(.M(13)) u13 (.x(x), .y(y), .p(p13));
  iso_mult #(.M(61)) u61 (.x(x), .y(y), .p(p61));
  iso_mult #(.M(71)) u71 (.x(x), .y(y), .p(p71));

  task automatic check(input int m, input res_t got);
    int exp;
    exp = (int'(x) * int'(y)) % m;
    checks++;
    if (int'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d x=%0d y=%0d got=%0d exp=%0d", m, x, y, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 71; i++)
      for (int j = 0; j < 71; j++) begin
        x = res_t'(i); y = res_t'(j); #1;
        if (i == 0 || j == 0) zeros++;
        check(71, p71);
        if (i < 61 && j < 61) check(61, p61);
        if (i < 13 && j < 13) check(13, p13);
        if (i < 3 && j < 3)   check(3, p3);
      end
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
