// tb_rns_madd: checks z = (x*y + w) mod M of the RNS multiply-add for a prime
// modulus (59, isomorphic path) exhaustively over x, y with random w, and for
// a power-of-two modulus (64, binary path) the same way. References are
// computed with integer arithmetic in the testbench.
module tb_rns_madd;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  res_t x, y, w59, w64, z59, z64;
  rns_madd #(.M(59)) u59 (.x(x), .y(y), .w(w59), .z(z59));
  rns_madd #(.M(64)) u64 (.x(x), .y(y), .w(w64), .z(z64));

  task automatic check(input int m, input res_t w, input res_t got);
    int exp;
    exp = (int'(x) * int'(y) + int'(w)) % m;
    checks++;
    if (int'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d x=%0d y=%0d w=%0d got=%0d exp=%0d", m, x, y, w, got, exp);
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
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        x = res_t'(i); y = res_t'(j);
        w59 = res_t'($urandom_range(58));
        w64 = res_t'($urandom_range(63));
        #1;
        check(64, w64, z64);
        if (i < 59 && j < 59) check(59, w59, z59);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
