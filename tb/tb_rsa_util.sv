// tb_rsa_util: reference arithmetic for the RSA testbenches.
//
// Wide-integer helpers (modular exponentiation, Fermat primality test,
// random primes), and the derivation of every value the core expects in
// its block RAM from a pair of primes: R2 constants, -m^-1 mod 2^17,
// CRT exponents and the CRT coefficients in Montgomery form. Everything is
// computed with plain SystemVerilog integer arithmetic, independently of the
// hardware's digit-serial Montgomery algorithm.
package tb_rsa_util;

  localparam int BW = 2304;            // wide enough for 1088-bit squares
  typedef logic [BW-1:0] big_t;

  function automatic big_t mulmod(input big_t a, input big_t b, input big_t m);
    return (a * b) % m;
  endfunction

  function automatic big_t modexp(input big_t b, input big_t e, input big_t m);
    big_t r, x;
    int top;
    r = 1; x = b % m; top = -1;
    for (int k = 0; k < BW; k++) if (e[k]) top = k;
    for (int k = top; k >= 0; k--) begin
      r = mulmod(r, r, m);
      if (e[k]) r = mulmod(r, x, m);
    end
    return r;
  endfunction

  function automatic bit is_prime(input big_t n);
    int sp[10] = '{3, 5, 7, 11, 13, 17, 19, 23, 29, 31};
    foreach (sp[k]) if (n % big_t'(sp[k]) == 0) return n == big_t'(sp[k]);
    return modexp(2, n - 1, n) == 1 && modexp(3, n - 1, n) == 1;
  endfunction

  // random prime of exactly `bits` bits with its two top bits set and
  // p-1 coprime to e
  function automatic big_t rand_prime(input int bits, input int unsigned e);
    big_t n;
    n = '0;
    for (int k = 0; k < bits; k += 32) n[k +: 32] = $urandom;
    n = n & ((big_t'(1) << bits) - 1);
    n[bits-1] = 1'b1; n[bits-2] = 1'b1; n[0] = 1'b1;
    while (!(((n - 1) % big_t'(e) != 0) && is_prime(n))) n = n + 2;
    return n;
  endfunction

  function automatic int bitlen(input big_t n);
    for (int k = BW - 1; k >= 0; k--) if (n[k]) return k + 1;
    return 0;
  endfunction

  // digits with at least 3 bits of headroom: 17*d >= bits + 3
  function automatic int ndigits(input int bits);
    return (bits + 3 + 16) / 17;
  endfunction

  // -m^-1 mod 2^17 for odd m
  function automatic int unsigned neg_inv17(input big_t m);
    logic [16:0] x, m17;
    m17 = m[16:0];
    x = 17'd1;
    for (int k = 0; k < 5; k++) x = x * (17'd2 - m17 * x);
    return int'(17'(-x));
  endfunction

  // d = e^-1 mod n for a small prime e not dividing n: find k with
  // k*n = -1 (mod e) by small-integer search, then d = (k*n + 1) / e
  function automatic big_t inv_small(input int unsigned e, input big_t n);
    longint unsigned nm;
    nm = longint'(n % big_t'(e));
    for (longint unsigned k = 1; k < e; k++)
      if ((k * nm + 1) % e == 0) return (big_t'(k) * n + 1) / big_t'(e);
    return '0;
  endfunction

  typedef struct {
    big_t p, q, m, c, pt, dp, dq;
    big_t r2m, r2p, r2q, zp, zq;
    int   minv, pinv, qinv;
    int   dm_n, dp_n, dq_n;
  } key_t;

  // A full key, a random plaintext and its cypher text for E = 65537.
  function automatic key_t make_key(input int bits);
    key_t k;
    int unsigned e;
    e = 65537;
    k.p = rand_prime(bits / 2, e);
    do k.q = rand_prime(bits / 2, e); while (k.q == k.p);
    k.m = k.p * k.q;
    k.dm_n = ndigits(bitlen(k.m));
    k.dp_n = ndigits(bitlen(k.p));
    k.dq_n = ndigits(bitlen(k.q));
    k.dp = inv_small(e, k.p - 1);
    k.dq = inv_small(e, k.q - 1);
    k.pt = '0;
    for (int j = 0; j < bits; j += 32) k.pt[j +: 32] = $urandom;
    k.pt = k.pt % k.m;
    k.c  = modexp(k.pt, big_t'(e), k.m);
    k.r2m = (big_t'(1) << (34 * k.dm_n)) % k.m;
    k.r2p = (big_t'(1) << (34 * k.dp_n)) % k.p;
    k.r2q = (big_t'(1) << (34 * k.dq_n)) % k.q;
    // CRT coefficients, then Montgomery form w.r.t. M
    k.zp = modexp(k.q, k.p - 1, k.m);
    k.zq = modexp(k.p, k.q - 1, k.m);
    k.zp = (k.zp << (17 * k.dm_n)) % k.m;
    k.zq = (k.zq << (17 * k.dm_n)) % k.m;
    k.minv = neg_inv17(k.m);
    k.pinv = neg_inv17(k.p);
    k.qinv = neg_inv17(k.q);
    return k;
  endfunction

  // Clock cycles the core needs for one decryption with this key (run to
  // done): length scan, 2+3 products per prime for steps 1 and 3, the
  // exponentiation, and the final addition.
  function automatic longint core_cycles(input key_t k, input bit sub_taken);
    longint t;
    int dmx, dpx, dqx;
    t = 1;                                                  // run seen
    t += 2 * (k.dm_n + k.dp_n + k.dq_n + k.dp_n + k.dq_n);  // scan
    for (int h = 0; h < 2; h++) begin
      int dh, dhx, dmxh;
      big_t ex;
      dh  = h ? k.dq_n : k.dp_n;
      ex  = h ? k.dq : k.dp;
      dhx = dh < 4 ? 4 : dh;
      dmxh = (k.dm_n > dh ? k.dm_n : dh); if (dmxh < 4) dmxh = 4;
      dmx = k.dm_n < 4 ? 4 : k.dm_n;
      t += 2 * (longint'(dh) * (2 * dmxh + 8) + 7);          // step 1
      t += 3 * (longint'(k.dm_n) * (2 * dmx + 8) + 7);       // step 3
      t += 3 * (longint'(dh) * (2 * dhx + 8) + 7);           // E1, E2, final
      t += 2 * dh;                                           // exponent digits
      for (int b = 0; b < 17 * dh; b++)
        t += (ex[b] ? 2 : 1) * (longint'(dh) * (2 * dhx + 8) + 7);
    end
    t += 3 * k.dm_n + (sub_taken ? 2 * k.dm_n : 0) + 2;     // step 4, finish, done flop
    return t;
  endfunction

  // Clock cycles of an encryption C = P^E mod M (run to done): length scan
  // of M and E, two conversions, one or two products per exponent bit over
  // all 17*le bits, the conversion back, finish and the done flop.
  function automatic longint enc_cycles(input int dm, input big_t e, input int le);
    longint t, mm;
    int dmx;
    dmx = dm < 4 ? 4 : dm;
    mm = longint'(dm) * (2 * dmx + 8) + 7;
    t = 1 + 2 * (dm + le) + 2 * mm + 2 * le + mm + 2;
    for (int b = 0; b < 17 * le; b++) t += (e[b] ? 2 : 1) * mm;
    return t;
  endfunction

endpackage
