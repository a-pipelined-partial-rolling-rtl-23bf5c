// gf_sbox: combinational AES S-box built from GF(2^4) arithmetic.
//
// Used by the round key circuits, where a look-up table would cost a block
// RAM. The byte is mapped by a linear isomorphism from GF(2^8) (modulo
// x^8+x^4+x^3+x+1) to GF((2^4)^2), inverted there, mapped back and passed
// through the AES affine transform:
//   * GF(2^4) is taken modulo x^4+x+1, GF((2^4)^2) modulo y^2+y+LAMBDA with
//     LAMBDA = 4'hc.
//   * The isomorphism sends x to beta = 8'h21 (a root of the AES polynomial in
//     the composite field); MAP_FWD[i] is beta^i, the image of bit i.
//     MAP_INV holds the images of the composite basis bits under the inverse.
//   * For a = h*y + l: d = LAMBDA*h^2 ^ h*l ^ l^2, and
//     a^-1 = (h*d^-1)*y + (h^l)*d^-1, with d^-1 = d^14 in GF(2^4)
//     (zero maps to zero).
// These field and basis choices are this design's own; any isomorphic
// construction gives the same S-box.
//
// Ports: x (8) in; y (8) out. Combinational.
module gf_sbox (
  input  logic [7:0] x,
  output logic [7:0] y
);

  localparam logic [3:0] LAMBDA = 4'hc;
  localparam logic [7:0] MAP_FWD [8] = '{8'h01, 8'h21, 8'h44, 8'h4e, 8'h34, 8'hda, 8'h3c, 8'he2};
  localparam logic [7:0] MAP_INV [8] = '{8'h01, 8'h5c, 8'he0, 8'h50, 8'hf3, 8'h03, 8'he4, 8'h3b};

  function automatic logic [3:0] mul4(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r = '0;
    logic [3:0] p = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= p;
      p = {p[2:0], 1'b0} ^ (p[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction

  function automatic logic [7:0] lin_map(input logic [7:0] v, input logic [7:0] cols [8]);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) if (v[i]) r ^= cols[i];
    return r;
  endfunction

  logic [7:0] c;        // composite-field image of x
  logic [3:0] h, l, d, d2, d4, d8, dinv;
  logic [7:0] ci;       // composite-field inverse
  logic [7:0] inv;      // GF(2^8) inverse of x

  always_comb begin
    c    = lin_map(x, MAP_FWD);
    h    = c[7:4];
    l    = c[3:0];
    d    = mul4(mul4(h, h), LAMBDA) ^ mul4(h, l) ^ mul4(l, l);
    d2   = mul4(d, d);
    d4   = mul4(d2, d2);
    d8   = mul4(d4, d4);
    dinv = mul4(mul4(d8, d4), d2);   // d^14 = d^-1
    ci   = {mul4(h, dinv), mul4(h ^ l, dinv)};
    inv  = lin_map(ci, MAP_INV);
    y    = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]}
               ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
  end

endmodule
