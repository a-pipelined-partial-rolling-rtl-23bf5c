// add_round_key: AddRoundKey, the 128-bit bitwise XOR of state and round key.
//
// Ports: state_in (128), round_key (128) in; state_out (128) out.
// Combinational.
module add_round_key (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out
);

  assign state_out = state_in ^ round_key;

endmodule
