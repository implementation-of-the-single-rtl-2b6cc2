// Reference arithmetic for the SM-QRNS testbenches.
//
// Plain modular arithmetic on wide integers, written independently of the
// circuit: no negator, mapping unit or lookup trick, only +, -, * and %.
// The modulus is passed in, so one package serves every word length up to
// N = 32 (products of two 33-bit residues fit comfortably in 128 bits).
package smq_ref_pkg;

  typedef logic [127:0] wide_t;

  function automatic wide_t modulus(input int unsigned n);
    return (wide_t'(1) << n) + 1;
  endfunction

  function automatic wide_t add_mod(input wide_t a, input wide_t b, input wide_t p);
    return (a + b) % p;
  endfunction

  function automatic wide_t sub_mod(input wide_t a, input wide_t b, input wide_t p);
    return (a + p - (b % p)) % p;
  endfunction

  function automatic wide_t mul_mod(input wide_t a, input wide_t b, input wide_t p);
    return (a * b) % p;
  endfunction

  // modular inverse by exhaustive-free power: p is odd; use extended Euclid
  function automatic wide_t inv_mod(input wide_t a, input wide_t p);
    wide_t r0, r1, t0, t1, q, tmp;
    r0 = p; r1 = a % p; t0 = 0; t1 = 1;
    while (r1 != 0) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = sub_mod(t0, mul_mod(q % p, t1, p), p); t0 = t1; t1 = tmp;
    end
    return t0;
  endfunction

  // j = 2^(n/2), the square root of -1 used by the design
  function automatic wide_t j_of(input int unsigned n);
    return wide_t'(1) << (n / 2);
  endfunction

  // uniformly spread random value below p
  function automatic wide_t rand_below(input wide_t p);
    wide_t r;
    r = {32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
    return r % p;
  endfunction

endpackage
