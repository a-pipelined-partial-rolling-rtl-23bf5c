// key_expansion: online key expansion for AES-128, ten round key circuits in
// a chain.
//
// Round key circuit r (1..NR) derives round key r from round key r-1 (the
// cipher key for r = 1) and holds it in two registers loaded by ld_a[r-1]
// and ld_b[r-1], the strobes of round unit r. The cipher key and its valid
// flag enter already registered alongside the plaintext, so a new key can be
// used for every block at full rate.
//
// Ports: key_in (128), valid_in in (stable during round 1's steps);
// ld_a/ld_b (NR) in; round_keys (NR*128, round 1 in the low slice) and
// valid (NR) out, registered.
module key_expansion #(
  parameter int unsigned NR = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [127:0]        key_in,
  input  logic                valid_in,
  input  logic [NR-1:0]       ld_a,
  input  logic [NR-1:0]       ld_b,
  output logic [NR*128-1:0]   round_keys,
  output logic [NR-1:0]       valid
);

  for (genvar r = 0; r < NR; r++) begin : g_rk
    logic [127:0] kin;
    logic         vin;
    if (r == 0) begin : g_first
      assign kin = key_in;
      assign vin = valid_in;
    end else begin : g_next
      assign kin = round_keys[128*(r-1) +: 128];
      assign vin = valid[r-1];
    end
    round_key_circuit #(.RCON(aes_pkg::rcon(r + 1))) u_rkc (
      .clk, .rst_n,
      .key_in    (kin),
      .valid_in  (vin),
      .ld_a      (ld_a[r]),
      .ld_b      (ld_b[r]),
      .key_out   (round_keys[128*r +: 128]),
      .valid_out (valid[r])
    );
  end

endmodule
