// aes_pkg: types, constants and constant functions shared by the PPR AES-128
// encryption core.
//
// A 128-bit AES state is kept as a packed vector in FIPS-197 byte order:
// byte X0 (row 0, column 0) occupies bits 127:120 and byte X15 (row 3,
// column 3) bits 7:0, so column c is bits 127-32c -: 32. The functions here
// are evaluated at elaboration only (S-box table contents, Rcon values,
// per-round reset phases); the datapath itself is built from gates in the
// modules that import this package.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;

  localparam int unsigned NR = 10;  // rounds of AES-128

  // Multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Full GF(2^8) multiplication (shift-and-add).
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t r = '0;
    byte_t p = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= p;
      p = xtime(p);
    end
    return r;
  endfunction

  // S-box table: entry x (bits 8x+7:8x) is the affine image of x^-1, built
  // from the powers of the generator 3 (inverse of 3^i is 3^(255-i)).
  function automatic logic [2047:0] sbox_table();
    logic [2047:0] t;
    byte_t exp_t [256];
    byte_t log_t [256];
    byte_t v = 8'h01;
    for (int i = 0; i < 255; i++) begin
      exp_t[i] = v;
      log_t[v] = byte_t'(i);
      v = v ^ xtime(v);            // v * 3
    end
    exp_t[255] = 8'h01;
    log_t[0]   = 8'h00;
    for (int x = 0; x < 256; x++) begin
      byte_t inv, b;
      inv = (x == 0) ? 8'h00 : exp_t[(255 - int'(log_t[x])) % 255];
      b = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
              ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      t[8*x +: 8] = b;
    end
    return t;
  endfunction

  // Round constant of key-expansion round r (1..10): x^(r-1) in GF(2^8).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Reset value of the step counter of round r (1-based) when a block takes
  // `steps` clocks: each round starts one clock after the previous one.
  function automatic int unsigned round_phase0(input int unsigned r, input int unsigned steps);
    return (steps - ((r - 1) % steps)) % steps;
  endfunction

endpackage
