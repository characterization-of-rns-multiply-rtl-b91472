// rns_pkg: types, constants and elaboration-time helper functions shared by
// the residue number system (RNS) multiply-add and FIR filter modules.
//
// A residue is carried in a fixed RW = 8 bit field, enough for every modulus
// the base selection allows (primes from 3 to 71 and one power of two from 4
// to 256). A modulus is a 9-bit value so that 256 can be written.
//
// The two default bases cover a 16-bit and a 48-bit dynamic range D = 2^d with
// 2^d <= M <= 2^(d+2), M the product of the moduli. The selection rule (primes
// 3..71, at most one power of two) is the one the design follows; the concrete
// sets are this design's own pick: the set with the fewest total residue bits,
// then the fewest moduli.
package rns_pkg;

  localparam int unsigned RW = 8;     // residue field width
  localparam int unsigned MW = 9;     // modulus field width
  localparam int unsigned MAXM = 256; // largest modulus

  typedef logic [RW-1:0] res_t;
  typedef logic [MW-1:0] mod_t;
  typedef logic [63:0]   wide_t;      // wide unsigned arithmetic (M < 2^62)

  // 16-bit dynamic range (small filter): M = 115168, about 2^16.8
  localparam int unsigned BASE16_P = 3;
  localparam mod_t [BASE16_P-1:0] BASE16 = {9'd61, 9'd59, 9'd32};

  // 48-bit dynamic range (large filter): M = 288341429886016, about 2^48.03
  localparam int unsigned BASE48_P = 9;
  localparam mod_t [BASE48_P-1:0] BASE48 =
    {9'd64, 9'd61, 9'd59, 9'd53, 9'd47, 9'd43, 9'd31, 9'd29, 9'd13};

  function automatic bit is_pow2(input int unsigned m);
    return (m != 0) && ((m & (m - 1)) == 0);
  endfunction

  function automatic bit is_prime(input int unsigned m);
    if (m < 2) return 1'b0;
    for (int unsigned q = 2; q * q <= m; q++)
      if (m % q == 0) return 1'b0;
    return 1'b1;
  endfunction

  // Smallest primitive root of a prime m: the generator g whose powers
  // g^0 .. g^(m-2) run through every nonzero residue.
  function automatic int unsigned prim_root(input int unsigned m);
    for (int unsigned g = 2; g < m; g++) begin
      int unsigned v;
      int unsigned ord;
      v = g;
      ord = 1;
      while (v != 1) begin
        v = (v * g) % m;
        ord++;
      end
      if (ord == m - 1) return g;
    end
    return 1; // m = 2 (not used by the base selection)
  endfunction

  // Multiplicative inverse of a modulo m (a and m co-prime).
  function automatic int unsigned mod_inv(input wide_t a, input int unsigned m);
    int unsigned r;
    r = int'(a % wide_t'(m));
    for (int unsigned t = 1; t < m; t++)
      if ((r * t) % m == 1) return t;
    return 0;
  endfunction

endpackage
