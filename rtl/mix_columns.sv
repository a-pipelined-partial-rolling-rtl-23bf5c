// mix_columns: AES MixColumns on a whole 128-bit state.
//
// Each column (a0..a3) becomes
//   b_r = 2*a_r ^ 3*a_(r+1) ^ a_(r+2) ^ a_(r+3)   (indices mod 4)
// in GF(2^8). Multiplication by the constant 2 is xtime (a shift and a
// conditional XOR with 8'h1b) and 3*a = 2*a ^ a, so the block is an XOR
// network only.
//
// Ports: state_in (128) in; state_out (128) out. Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = state_in[127 - 32*c - 8*r -: 8];
      for (int r = 0; r < 4; r++) begin
        state_out[127 - 32*c - 8*r -: 8] =
            xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
      end
    end
  end

endmodule
