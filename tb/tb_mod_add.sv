// tb_mod_add: exhaustive check of the modular adder for a prime modulus (61),
// a small prime (13) and a power of two (32): every pair of residues a, b is
// applied and s is compared with (a + b) mod M computed in the testbench.
module tb_mod_add;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  res_t a, b, s61, s13, s32;
  mod_add #(.M(61)) u61 (.a(a), .b(b), .s(s61));
  mod_add #(.M(13)) u13 (.a(a), .b(b), .s(s13));
  mod_add #(.M(32)) u32 (.a(a), .b(b), .s(s32));

  task automatic check(input int m, input res_t got);
    int exp;
    exp = (int'(a) + int'(b)) % m;
    checks++;
    if (int'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d a=%0d b=%0d got=%0d exp=%0d", m, a, b, got, exp);
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
    for (int i = 0; i < 61; i++)
      for (int j = 0; j < 61; j++) begin
        a = res_t'(i); b = res_t'(j); #1;
        check(61, s61);
        if (i < 13 && j < 13) check(13, s13);
        if (i < 32 && j < 32) check(32, s32);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
