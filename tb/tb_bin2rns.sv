// tb_bin2rns: checks the input converter on the 48-bit base and on the 16-bit
// base with random two's complement inputs plus the extreme values. Each
// residue is compared with the non-negative remainder of the signed input,
// computed in the testbench with 64-bit signed arithmetic.
module tb_bin2rns;
  import rns_pkg::*;
  int checks = 0, failures = 0;

  logic [47:0] x48;
  logic [15:0] x16;
  res_t [BASE48_P-1:0] r48;
  res_t [BASE16_P-1:0] r16;

  bin2rns #(.DW(48), .P(BASE48_P), .MODULI(BASE48)) u48 (.x(x48), .r(r48));
  bin2rns #(.DW(16), .P(BASE16_P), .MODULI(BASE16)) u16 (.x(x16), .r(r16));

  function automatic int smod(input longint v, input int m);
    longint q;
    q = v % longint'(m);
    if (q < 0) q += longint'(m);
    return int'(q);
  endfunction

  task automatic run(input logic [47:0] v48, input logic [15:0] v16);
    longint s48, s16;
    x48 = v48; x16 = v16; #1;
    s48 = longint'($signed(v48));
    s16 = longint'($signed(v16));
    for (int i = 0; i < BASE48_P; i++) begin
      checks++;
      if (int'(r48[i]) != smod(s48, int'(BASE48[i]))) begin
        failures++;
        if (failures < 10) $display("FAIL48 x=%0d m=%0d got=%0d", s48, BASE48[i], r48[i]);
      end
    end
    for (int i = 0; i < BASE16_P; i++) begin
      checks++;
      if (int'(r16[i]) != smod(s16, int'(BASE16[i]))) begin
        failures++;
        if (failures < 10) $display("FAIL16 x=%0d m=%0d got=%0d", s16, BASE16[i], r16[i]);
      end
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
    run('0, '0);
    run({1'b1, 47'b0}, {1'b1, 15'b0});
    run({1'b0, {47{1'b1}}}, {1'b0, {15{1'b1}}});
    run('1, '1);
    for (int n = 0; n < 3000; n++)
      run(48'({$urandom(), $urandom()}), 16'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
