// rolling_part_8sm: rolling part 8SM, SubBytes and ShiftRows in two steps.
//
// The permutation network and 16-to-8-byte selector hand eight bytes per
// step to eight S-Modules: in step 0 rows 0 and 2 of the ShiftRows result,
// in step 1 rows 1 and 3. S-Module 2c collects rows 0,1 of column c and
// S-Module 2c+1 rows 2,3 in their 16-bit registers, so their concatenation is
// ShiftRows(SubBytes(state_in)) in FIPS-197 byte order.
//
// Timing: state_in must be stable during the two clocks with step 0 and 1;
// state_out is complete during the clock after step 1 (the next block's
// step 0). `first`/`last` flag steps 0 and 1. PHASE0 is the control part's
// reset step.
//
// Ports: clk, rst_n, state_in (128) in; state_out (128), first, last out.
// Only bit 0 of the control part's 2-bit step is used (it is Sel).
module rolling_part_8sm #(
  parameter int unsigned PHASE0 = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] state_in,
  output logic [127:0] state_out,
  output logic         first,
  output logic         last
);

  logic [1:0]  step;
  logic [63:0] bytes_sel;

  rolling_ctrl #(.STEPS(2), .PHASE0(PHASE0)) u_ctrl (
    .clk, .rst_n, .step, .first, .last
  );

  perm_selector u_sel (.x(state_in), .sel(step[0]), .y(bytes_sel));

  for (genvar j = 0; j < 8; j++) begin : g_sm
    s_module #(.STEPS(2)) u_sm (
      .clk,
      .addr (bytes_sel[63 - 8*j -: 8]),
      .acc  (state_out[127 - 16*j -: 16])
    );
  end

endmodule
