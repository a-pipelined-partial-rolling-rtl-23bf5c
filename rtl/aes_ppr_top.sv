// aes_ppr_top: AES-128 encryption core in the pipelined partial rolling (PPR)
// architecture.
//
// Ten round units and ten round key circuits form a pipeline that accepts a
// new (plaintext, key) pair every STEPS clocks and keeps up to ten blocks in
// flight. Inside each round, SubBytes and ShiftRows are not done by 16
// S-boxes at once but by NUM_SM table S-boxes reused over STEPS = 16/NUM_SM
// clocks (the "rolling part"), so only 4 (AES-4SM) or 8 (AES-8SM) S-box ROMs
// are needed per round instead of 16. The round keys are computed on the
// fly, in step with the data, by combinational-logic S-boxes, so the key may
// change with every block and no round-key memory is needed.
//
// Pipeline: input register (plaintext ^ key, i.e. round 0's AddRoundKey,
// plus the key and a valid flag) -> round 1 .. round 10, each with two
// register stages (S-Module registers, pipeline register), 21 register stages
// in all. Round r's steps run one clock after round r-1's.
//
// Interface and timing (single clock, synchronous active-low reset):
//   in_ready  is high one clock in every STEPS; a block is taken at the end
//             of that clock when in_valid is high (no back-pressure: the
//             pipeline never stalls, a clock with in_valid low is a bubble).
//   out_valid is high for one clock: the clock that follows the
//             10*(STEPS+1)-th rising edge after the accepting edge (50 clocks
//             for 4SM, 30 for 8SM); ciphertext then stays unchanged for STEPS
//             clocks.
// Byte order everywhere is FIPS-197: the first byte is bits 127:120.
module aes_ppr_top
  import aes_pkg::*;
#(
  parameter int unsigned NUM_SM = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_ready,
  input  logic         in_valid,
  input  logic [127:0] plaintext,
  input  logic [127:0] key,
  output logic         out_valid,
  output logic [127:0] ciphertext
);

  localparam int unsigned STEPS = 16 / NUM_SM;

  logic [127:0]       state0;      // plaintext ^ key (initial AddRoundKey)
  logic [127:0]       key0;        // cipher key travelling with the block
  logic               valid0;
  logic [127:0]       round_in  [NR];
  logic [127:0]       round_out [NR];
  logic [NR-1:0]      roll_last, preg_load;
  logic [NR*128-1:0]  round_keys;
  logic [NR-1:0]      key_valid;
  logic               fresh;

  // ---- input stage: takes a block on round 1's last rolling step ----
  assign in_ready = roll_last[0];

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      state0 <= plaintext ^ key;
      key0   <= key;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        valid0 <= 1'b0;
    else if (in_ready) valid0 <= in_valid;
  end

  // ---- round units ----
  for (genvar r = 0; r < NR; r++) begin : g_round
    if (r == 0) begin : g_in0
      assign round_in[r] = state0;
    end else begin : g_inr
      assign round_in[r] = round_out[r-1];
    end
    round_unit #(
      .NUM_SM (NUM_SM),
      .FINAL  (r == NR - 1),
      .PHASE0 (round_phase0(r + 1, STEPS))
    ) u_round (
      .clk, .rst_n,
      .state_in  (round_in[r]),
      .round_key (round_keys[128*r +: 128]),
      .state_out (round_out[r]),
      .roll_last (roll_last[r]),
      .preg_load (preg_load[r])
    );
  end

  // ---- online key expansion ----
  key_expansion #(.NR(NR)) u_keys (
    .clk, .rst_n,
    .key_in     (key0),
    .valid_in   (valid0),
    .ld_a       (roll_last),
    .ld_b       (preg_load),
    .round_keys (round_keys),
    .valid      (key_valid)
  );

  // ---- output ----
  always_ff @(posedge clk) begin
    if (!rst_n) fresh <= 1'b0;
    else        fresh <= preg_load[NR-1];
  end

  assign ciphertext = round_out[NR-1];
  assign out_valid  = fresh && key_valid[NR-1];

  // block slots and results come at most once per block period
  assert property (@(posedge clk) disable iff (!rst_n) in_ready |=> !in_ready)
    else $error("aes_ppr_top: in_ready high in two consecutive clocks");
  assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid)
    else $error("aes_ppr_top: out_valid high in two consecutive clocks");

  initial begin
    assert (NUM_SM == 4 || NUM_SM == 8) else $error("aes_ppr_top: NUM_SM must be 4 or 8");
  end

endmodule
