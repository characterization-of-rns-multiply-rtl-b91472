// madd_dse_lane: test helper. One complete RNS multiply-add unit for a given
// base: three input converters, one rns_madd per modulus, one output
// converter. It applies COUNT random vectors X, Y, W (X and Y in DW/2-1 bits,
// W in DW-2 bits, so Z = X*Y + W stays inside DW bits) and compares Z with
// 64-bit signed arithmetic. Every fourth Y has its most significant bits held
// at 0 or 1 (a reduced dynamic range). Results appear on checks/failures
// when done rises.
module madd_dse_lane
  import rns_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned P  = BASE16_P,
  parameter mod_t [P-1:0] MODULI = BASE16,
  parameter int unsigned COUNT = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);
  logic [DW-1:0] x, y, w, z;
  res_t [P-1:0]  xr, yr, wr, zr;

  bin2rns #(.DW(DW), .P(P), .MODULI(MODULI)) u_cx (.x(x), .r(xr));
  bin2rns #(.DW(DW), .P(P), .MODULI(MODULI)) u_cy (.x(y), .r(yr));
  bin2rns #(.DW(DW), .P(P), .MODULI(MODULI)) u_cw (.x(w), .r(wr));

  for (genvar i = 0; i < P; i++) begin : g_ch
    rns_madd #(.M(int'(MODULI[i]))) u_madd (.x(xr[i]), .y(yr[i]), .w(wr[i]), .z(zr[i]));
  end

  rns2bin #(.DW(DW), .P(P), .MODULI(MODULI)) u_cz (.r(zr), .x(z));

  function automatic longint rnd(input int unsigned bits);
    longint v;
    v = longint'({$urandom(), $urandom()});
    v = v & ((64'sd1 <<< bits) - 1);
    return v - (64'sd1 <<< (bits - 1));     // signed, bits wide
  endfunction

  initial begin
    longint xv, yv, wv, zv;
    checks = 0; failures = 0; done = 1'b0;
    x = '0; y = '0; w = '0;
    for (int n = 0; n < int'(COUNT); n++) begin
      xv = rnd(DW / 2 - 1);
      yv = rnd(DW / 2 - 1);
      wv = rnd(DW - 2);
      if (n % 4 == 3) begin
        // hold the upper half of Y's bits at the sign: reduced dynamic range
        yv = rnd(DW / 4);
      end
      zv = xv * yv + wv;
      x = DW'(xv); y = DW'(yv); w = DW'(wv);
      #1;
      checks++;
      if (longint'($signed(z)) != zv) begin
        failures++;
        if (failures < 5) $display("FAIL DW=%0d x=%0d y=%0d w=%0d z=%0d exp=%0d", DW, xv, yv, wv, $signed(z), zv);
      end
    end
    done = 1'b1;
  end
endmodule
