// tb_util_pkg: wide-integer reference arithmetic for the testbenches.
//
// Plain modular arithmetic on up to 256-bit operands held in 512-bit
// variables, using the simulator's wide multiply and remainder. It is written
// independently of the RTL (no Montgomery loop, no binary inversion):
// inverses come from Fermat's little theorem, a^(p-2) mod p.
package tb_util_pkg;

  typedef logic [511:0] big_t;

  // Test moduli (primes).
  localparam big_t P256 = 512'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;
  localparam big_t P127 = (512'd1 << 127) - 1;
  localparam big_t P61  = (512'd1 << 61) - 1;

  function automatic big_t mulmod(big_t a, big_t b, big_t m);
    return (a * b) % m;
  endfunction

  function automatic big_t addmod(big_t a, big_t b, big_t m);
    return (a + b) % m;
  endfunction

  function automatic big_t submod(big_t a, big_t b, big_t m);
    return (a + m - b) % m;
  endfunction

  function automatic big_t powmod(big_t a, big_t e, big_t m);
    big_t r, b;
    r = 1;
    b = a % m;
    for (int i = 0; i < 512; i++) begin
      if (e == 0) break;
      if (e[0]) r = mulmod(r, b, m);
      b = mulmod(b, b, m);
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic big_t invmod(big_t a, big_t m);
    return powmod(a, m - 2, m);
  endfunction

  // Montgomery form x * 2^rbits mod m.
  function automatic big_t to_mont(big_t x, int rbits, big_t m);
    return (x << rbits) % m;
  endfunction

  // Uniform-ish random value below m (m of at most nbits bits).
  function automatic big_t rand_below(big_t m, int nbits);
    big_t r;
    r = '0;
    for (int i = 0; i < 16; i++) r[i*32 +: 32] = $urandom;
    if (nbits < 512) r = r & ((512'd1 << nbits) - 1);
    return r % m;
  endfunction

endpackage
