// perm_selector: permutation network and 16-byte to 8-byte selector of
// rolling part 8SM.
//
// The permutation places input bytes at output positions 0..15 as
//   X0 X10 X4 X14 X8 X2 X12 X6 | X5 X15 X9 X3 X13 X7 X1 X11
// (position 0 and X0 are bits 127:120). That is the ShiftRows result with
// rows 0 and 2 of each column side by side in the upper eight bytes and rows
// 1 and 3 in the lower eight. The selector then passes the upper eight bytes
// when sel = 0 and the lower eight when sel = 1, so the eight S-Modules see
// rows 0/2 in the first step and rows 1/3 in the second.
//
// Ports: x (128), sel in; y (64) out. Combinational.
module perm_selector (
  input  logic [127:0] x,
  input  logic         sel,
  output logic [63:0]  y
);

  // SRC[i] is the input byte index that appears at permuted byte i
  localparam int SRC [16] = '{0, 10, 4, 14, 8, 2, 12, 6, 5, 15, 9, 3, 13, 7, 1, 11};

  logic [127:0] perm;

  always_comb begin
    for (int i = 0; i < 16; i++) perm[127 - 8*i -: 8] = x[127 - 8*SRC[i] -: 8];
  end

  assign y = sel ? perm[63:0] : perm[127:64];

endmodule
