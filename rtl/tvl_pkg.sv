// tvl_pkg - shared types, constants and helper functions for ternary-value-logic (TVL)
// arithmetic.
//
// Every ternary digit (trit) is carried on two binary wires with the unsigned binary code of
// its value: 2'd0, 2'd1, 2'd2; the code 2'd3 is never produced. A multi-trit number is a packed
// array of trits, trit 0 being the least significant (weight 3^0). The trit values and the
// unsigned (0, 1, 2) digit set follow the ternary number system this design is built on; the
// two-wire encoding is this design's choice for a binary FPGA fabric.
//
// The functions below are used at elaboration time to fill look-up tables (ternary image of an
// integer, powers of two, CRT weights) and to size the datapath from the index and modulus trit
// lengths, and by the testbenches as reference models. The sizing formulas reproduce the
// trit-length columns of the DBTNS multiplier and TRNS adder data tables.
package tvl_pkg;

  typedef logic [1:0] trit_t;

  // Widest ternary word the helper functions handle: 41 trits cover 2^64, 43 the largest
  // double-base operand 2^26*3^26 of 3-trit indices.
  localparam int MAXT = 48;
  typedef trit_t [MAXT-1:0] tword_t;

  // Ternary full adder: a + b + c with every operand a trit (carry-in may be 0, 1 or 2).
  // Returns {carry, sum}; the carry is 0, 1 or 2.
  function automatic logic [3:0] tfa(trit_t a, trit_t b, trit_t c);
    logic [2:0] s;
    s = {1'b0, a} + {1'b0, b} + {1'b0, c};     // 0 .. 6
    if (s >= 3'd6)      return {2'd2, 2'(s - 3'd6)};
    else if (s >= 3'd3) return {2'd1, 2'(s - 3'd3)};
    else                return {2'd0, s[1:0]};
  endfunction

  function automatic longint unsigned pow3(int e);
    longint unsigned r = 1;
    for (int k = 0; k < e; k++) r = r * 3;
    return r;
  endfunction

  // Number of trits needed to write v (at least one).
  function automatic int trits_for(longint unsigned v);
    int t = 1;
    while (v >= 3) begin
      v = v / 3;
      t++;
    end
    return t;
  endfunction

  // Number of bits needed to write v (at least one).
  function automatic int bits_for(longint unsigned v);
    int b = 1;
    while (v >= 2) begin
      v = v / 2;
      b++;
    end
    return b;
  endfunction

  // Integer to ternary word and back.
  function automatic tword_t to_tvl(longint unsigned v);
    tword_t t;
    for (int k = 0; k < MAXT; k++) begin
      t[k] = trit_t'(v % 3);
      v    = v / 3;
    end
    return t;
  endfunction

  function automatic longint unsigned from_tvl(tword_t t);
    longint unsigned v = 0;
    for (int k = MAXT - 1; k >= 0; k--) v = v * 3 + longint'(t[k]);
    return v;
  endfunction

  // ---- sizing of the DBTNS multiplier (index trit length n) -----------------------------
  // Largest index value: n trits hold 0 .. 3^n-1.
  function automatic int idx_max(int n);
    return int'(pow3(n)) - 1;
  endfunction
  // N: trits of the 2^(i1+i2) table entries (3, 11, 33 for n = 1, 2, 3).
  function automatic int pow2_trits(int n);
    return trits_for(64'd1 << (2 * idx_max(n)));
  endfunction
  // M: trits of the product = N + largest shift 2*(3^n-1) (7, 27, 85 for n = 1, 2, 3).
  function automatic int prod_trits(int n);
    return pow2_trits(n) + 2 * idx_max(n);
  endfunction
  // The largest operand is 2^(3^n-1) * 3^(3^n-1) (36, 1679616, 2^26*3^26 for n = 1, 2, 3). It
  // exceeds 64 bits for n = 3, so it is never formed as one integer: its trit length is that
  // of 2^(3^n-1) plus 3^n-1 (a factor 3^j appends j zero trits), and its bit length is that of
  // 3^(3^n-1) plus 3^n-1.
  function automatic int opnd_trits(int n);
    return trits_for(64'd1 << idx_max(n)) + idx_max(n);
  endfunction
  function automatic int opnd_bits(int n);
    return bits_for(pow3(idx_max(n))) + idx_max(n);
  endfunction
  // Ternary word of the double-base value 2^i * 3^j (2^i written in ternary, shifted up j
  // trits), for i < 64 and j + trits of 2^i <= MAXT.
  function automatic tword_t dbtns_tvl(int i, int j);
    tword_t p2, w;
    p2 = to_tvl(64'd1 << i);
    w  = '0;
    for (int t = 0; t + j < MAXT; t++) w[t + j] = p2[t];
    return w;
  endfunction

  // ---- moduli set {3^n-2, 3^n-1, 3^n}: index 0 -> 3^n, 1 -> 3^n-1, 2 -> 3^n-2 ------------
  function automatic longint unsigned modulus(int n, int which);
    return pow3(n) - longint'(which);
  endfunction
  // Dynamic range M = (3^n-2)(3^n-1)3^n.
  function automatic longint unsigned dyn_range(int n);
    return modulus(n, 0) * modulus(n, 1) * modulus(n, 2);
  endfunction

  // Modular inverse of a modulo m (a and m coprime), by search; elaboration use only.
  function automatic longint unsigned mod_inv(longint unsigned a, longint unsigned m);
    longint unsigned r = 0;
    if (m == 1) return 0;
    for (longint unsigned k = 1; k < m; k++) if (((a % m) * k) % m == 1) r = k;
    return r;
  endfunction

  // CRT weight of a residue r of modulus `which`: r * Mi * (Mi^-1 mod mi) mod M.
  function automatic longint unsigned crt_term(int n, int which, longint unsigned r);
    longint unsigned mm, mi, big_mi, inv;
    mm     = dyn_range(n);
    mi     = modulus(n, which);
    big_mi = mm / mi;
    inv    = mod_inv(big_mi, mi);
    return ((r % mi) * ((big_mi * inv) % mm)) % mm;
  endfunction

endpackage
