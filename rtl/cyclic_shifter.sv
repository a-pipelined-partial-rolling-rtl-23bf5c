// cyclic_shifter: the 16-byte cyclic shifter of rolling part 4SM.
//
// Picks four bytes out of the 16-byte state: y = (X[K], X[K+4], X[K+8],
// X[K+12]), indices modulo 16, with X0 in bits 127:120 of x and the first
// selected byte in bits 31:24 of y. With K = 0, 5, 10, 15 the four outputs
// are rows 0, 1, 2, 3 of the ShiftRows result (columns 0..3), which is how
// the rolling part folds ShiftRows into the byte selection.
//
// Ports: x (128), k (4) in; y (32) out. Combinational.
module cyclic_shifter (
  input  logic [127:0] x,
  input  logic [3:0]   k,
  output logic [31:0]  y
);

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic [3:0] idx;
      idx = k + 4'(4 * j);
      y[31 - 8*j -: 8] = x[127 - 8*idx -: 8];
    end
  end

endmodule
