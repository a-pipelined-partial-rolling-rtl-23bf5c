// round_key_circuit: one round of the online AES-128 key expansion.
//
// From the previous round key (w0, w1, w2, w3) it forms
//   w4 = w0 ^ SubWord(RotWord(w3)) ^ {RCON, 24'h0}, w5 = w1 ^ w4,
//   w6 = w2 ^ w5, w7 = w3 ^ w6
// with four combinational S-boxes (gf_sbox). The result passes two
// registers loaded with the same strobes as the round unit's two register
// stages: register A with ld_a (the round's last rolling step, when the
// S-Modules complete), register B with ld_b (the pipeline register load).
// key_out therefore changes together with the round's pipeline register.
// A valid flag, reset to 0, travels through the same two registers.
//
// Ports: key_in (128), valid_in must be stable at the ld_a edge; key_out
// (128), valid_out are registered.
module round_key_circuit
  import aes_pkg::*;
#(
  parameter logic [7:0] RCON = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key_in,
  input  logic         valid_in,
  input  logic         ld_a,
  input  logic         ld_b,
  output logic [127:0] key_out,
  output logic         valid_out
);

  word_t w0, w1, w2, w3, rot, sub, w4, w5, w6, w7;
  logic [127:0] key_a;
  logic         valid_a;

  assign {w0, w1, w2, w3} = key_in;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    gf_sbox u_sbox (.x(rot[8*i +: 8]), .y(sub[8*i +: 8]));
  end

  assign w4 = w0 ^ sub ^ {RCON, 24'h0};
  assign w5 = w1 ^ w4;
  assign w6 = w2 ^ w5;
  assign w7 = w3 ^ w6;

  always_ff @(posedge clk) begin
    if (ld_a) key_a <= {w4, w5, w6, w7};
    if (ld_b) key_out <= key_a;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_a   <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      if (ld_a) valid_a   <= valid_in;
      if (ld_b) valid_out <= valid_a;
    end
  end

endmodule
