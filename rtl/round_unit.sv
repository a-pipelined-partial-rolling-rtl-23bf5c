// round_unit: one AES round of the PPR pipeline.
//
// Rolling part (4SM or 8SM) -> 128-bit pipeline register -> MixColumns ->
// AddRoundKey. The rolling part performs SubBytes and ShiftRows over STEPS
// clocks (4 for NUM_SM=4, 2 for NUM_SM=8); the pipeline register takes its
// result in the clock after the last step, when the S-Module registers hold
// the whole state. MixColumns and the key XOR are combinational after the
// pipeline register, so state_out stays stable for a full block period of
// STEPS clocks and feeds the next round, whose steps run one clock later
// (its PHASE0 is one lower). FINAL=1 drops MixColumns (round 10).
//
// Ports: state_in (128) must be stable through this round's steps 0..STEPS-1;
// round_key (128) must change together with the pipeline register (it comes
// from the round key circuit loaded by preg_load). roll_last marks the last
// rolling step, preg_load the clock whose edge loads the pipeline register.
module round_unit #(
  parameter int unsigned NUM_SM = 4,
  parameter bit          FINAL  = 1'b0,
  parameter int unsigned PHASE0 = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out,
  output logic         roll_last,
  output logic         preg_load
);

  logic [127:0] sr_sb;   // ShiftRows(SubBytes(state_in)) from the S-Modules
  logic [127:0] preg;    // 128-bit pipeline register
  logic [127:0] mixed;

  if (NUM_SM == 8) begin : g_8sm
    rolling_part_8sm #(.PHASE0(PHASE0)) u_roll (
      .clk, .rst_n, .state_in, .state_out(sr_sb), .first(preg_load), .last(roll_last)
    );
  end else begin : g_4sm
    rolling_part_4sm #(.PHASE0(PHASE0)) u_roll (
      .clk, .rst_n, .state_in, .state_out(sr_sb), .first(preg_load), .last(roll_last)
    );
  end

  always_ff @(posedge clk) begin
    if (preg_load) preg <= sr_sb;
  end

  if (FINAL) begin : g_final
    assign mixed = preg;
  end else begin : g_mix
    mix_columns u_mix (.state_in(preg), .state_out(mixed));
  end

  add_round_key u_ark (.state_in(mixed), .round_key, .state_out);

  initial begin
    assert (NUM_SM == 4 || NUM_SM == 8) else $error("round_unit: NUM_SM must be 4 or 8");
  end

endmodule
