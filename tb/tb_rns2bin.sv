// tb_rns2bin: checks the CRT output converter on the 48-bit and 16-bit bases.
// Random signed values inside the dynamic range (and its two ends) are split
// into residues by the testbench and must come back unchanged.
module tb_rns2bin;
  import rns_pkg::*;
  int checks = 0, failures = 0;
  int negs = 0;

  res_t [BASE48_P-1:0] r48;
  res_t [BASE16_P-1:0] r16;
  logic [47:0] x48;
  logic [15:0] x16;

  rns2bin #(.DW(48), .P(BASE48_P), .MODULI(BASE48)) u48 (.r(r48), .x(x48));
  rns2bin #(.DW(16), .P(BASE16_P), .MODULI(BASE16)) u16 (.r(r16), .x(x16));

  function automatic res_t smod(input longint v, input int m);
    longint q;
    q = v % longint'(m);
    if (q < 0) q += longint'(m);
    return res_t'(q);
  endfunction

  task automatic run(input longint v48, input longint v16);
    for (int i = 0; i < BASE48_P; i++) r48[i] = smod(v48, int'(BASE48[i]));
    for (int i = 0; i < BASE16_P; i++) r16[i] = smod(v16, int'(BASE16[i]));
    #1;
    if (v48 < 0) negs++;
    checks += 2;
    if (longint'($signed(x48)) != v48) begin
      failures++;
      if (failures < 10) $display("FAIL48 exp=%0d got=%0d", v48, $signed(x48));
    end
    if (longint'($signed(x16)) != v16) begin
      failures++;
      if (failures < 10) $display("FAIL16 exp=%0d got=%0d", v16, $signed(x16));
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
    run(0, 0);
    run(-(64'sd1 <<< 47), -32768);
    run((64'sd1 <<< 47) - 1, 32767);
    run(-1, -1);
    for (int n = 0; n < 3000; n++)
      run(longint'($signed(48'({$urandom(), $urandom()}))), longint'($signed(16'($urandom()))));
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
