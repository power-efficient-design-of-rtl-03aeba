// rns_pkg -- constants, types and elaboration-time number theory shared by the
// residue number system (RNS) FIR filter.
//
// The filter works in the RNS base {3,5,7,11,13,17,19,23,31,32}: ten pairwise
// co-prime moduli whose product M = 110,654,063,520 covers a 36-bit dynamic
// range. Every residue is carried in a RW = 5 bit field of the packed rns_t
// bundle; inside each modular channel only ceil(log2 m) bits are stored, so the
// registers hold 41 bits per RNS word (2+3+3+4+4+5+5+5+5+5).
//
// The functions below are evaluated only at elaboration time, with constant
// arguments, to fill the look-up tables of the isomorphic multipliers and of
// the converters. They are not meant to be synthesized with variable inputs.
package rns_pkg;

  localparam int P  = 10;   // number of moduli
  localparam int RW = 5;    // width of one residue field in rns_t

  typedef int unsigned modlist_t [P];
  localparam modlist_t MODULI = '{3, 5, 7, 11, 13, 17, 19, 23, 31, 32};

  typedef logic [RW-1:0]         res_t;
  typedef logic [P-1:0][RW-1:0]  rns_t;

  // Architecture of the modular multiplier used for a prime modulus.
  typedef enum int {
    ISO_BASIC = 0,  // DIT, DIT, modulo m-1 adder, IIT
    ISO_MOD   = 1,  // DIT, DIT*, binary adder, doubled IIT/IIT* table
    ISO_SUB   = 2   // index addition split over the co-prime factors of m-1
  } mult_arch_e;

  // One multiplier architecture per modulus, in the order of MODULI. The
  // entry of a non-prime modulus is ignored.
  typedef mult_arch_e arch_list_t [P];

  // Bits needed to hold the values 0 .. n-1 (at least 1), for 64-bit n.
  function automatic int cw(longint unsigned n);
    int w = 1;
    while ((64'd1 << w) < n) w++;
    return w;
  endfunction

  // The same for 32-bit n.
  function automatic int cwi(int unsigned n);
    int w = 1;
    while ((32'd1 << w) < n) w++;
    return w;
  endfunction

  // Product of all moduli (dynamic range of the base).
  function automatic longint unsigned dyn_range();
    longint unsigned m = 1;
    for (int i = 0; i < P; i++) m = m * 64'(MODULI[i]);
    return m;
  endfunction

  // Total bits of one RNS word stored modulus by modulus.
  function automatic int rns_bits();
    int b = 0;
    for (int i = 0; i < P; i++) b += cwi(MODULI[i]);
    return b;
  endfunction

  // The functions below work on small moduli (below 2^15), so all their
  // intermediate products fit in 32 bits.

  function automatic bit is_prime(int unsigned m);
    if (m < 2) return 1'b0;
    for (int unsigned d = 2; d * d <= m; d++)
      if (m % d == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit is_pow2(int unsigned m);
    return (m != 0) && ((m & (m - 1)) == 0);
  endfunction

  // <b^e>_m
  function automatic int unsigned pow_mod(int unsigned b, int unsigned e, int unsigned m);
    int unsigned r = 1 % m;
    for (int unsigned k = 0; k < e; k++) r = (r * b) % m;
    return r;
  endfunction

  // Smallest primitive root of a prime m (order of r equals m-1).
  function automatic int unsigned prim_root(int unsigned m);
    if (m == 2) return 1;
    for (int unsigned r = 2; r < m; r++) begin
      int unsigned x     = 1;
      int unsigned order = 0;
      do begin
        x = (x * r) % m;
        order++;
      end while (x != 1);
      if (order == m - 1) return r;
    end
    return 0;
  endfunction

  // Index (discrete logarithm) k of a != 0 with <r^k>_m = a, 0 <= k <= m-2.
  function automatic int unsigned dlog(int unsigned a, int unsigned r, int unsigned m);
    int unsigned x = 1;
    for (int unsigned k = 0; k < m - 1; k++) begin
      if (x == a % m) return k;
      x = (x * r) % m;
    end
    return 0;
  endfunction

  // Multiplicative inverse of a modulo m (a and m co-prime).
  function automatic int unsigned mod_inv(int unsigned a, int unsigned m);
    for (int unsigned v = 0; v < m; v++)
      if ((a * v) % m == 1 % m) return v;
    return 0;
  endfunction

  // Number of prime-power factors of n (its co-prime decomposition).
  function automatic int n_factors(int unsigned n);
    int cnt = 0;
    for (int unsigned d = 2; d <= n; d++) begin
      if (n % d == 0) begin
        cnt++;
        while (n % d == 0) n = n / d;
      end
    end
    return (cnt == 0) ? 1 : cnt;
  endfunction

  // i-th prime-power factor of n, in increasing order of its prime.
  function automatic int unsigned factor(int unsigned n, int i);
    int cnt = 0;
    if (n < 2) return n;
    for (int unsigned d = 2; d <= n; d++) begin
      if (n % d == 0) begin
        int unsigned q = 1;
        while (n % d == 0) begin
          n = n / d;
          q = q * d;
        end
        if (cnt == i) return q;
        cnt++;
      end
    end
    return 1;
  endfunction

  // Bit offset of the i-th factor's field when the residues over the factors
  // of n are concatenated (factor 0 in the least significant bits).
  function automatic int factor_off(int unsigned n, int i);
    int off = 0;
    for (int k = 0; k < i; k++) off += cwi(factor(n, k));
    return off;
  endfunction

endpackage
