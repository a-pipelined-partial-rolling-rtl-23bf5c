// rolling_part_4sm: rolling part 4SM, SubBytes and ShiftRows in four steps.
//
// A 16-byte cyclic shifter, driven by the control part with K = 0, 5, 10, 15,
// hands row 0, 1, 2, 3 of the ShiftRows result (one byte per column) to four
// S-Modules. S-Module j substitutes its byte and shifts it into a 32-bit
// register, so after four steps S-Module j holds column j of
// ShiftRows(SubBytes(state_in)). Only four S-box ROMs serve the 16 bytes.
//
// Timing: state_in must be stable during the four clocks with step 0..3. The
// step-k result is stored at the edge that ends step k; state_out is the
// complete result during the clock that follows step 3 (the next block's
// step 0) and is overwritten byte by byte after that. `first`/`last` flag
// steps 0 and 3. PHASE0 is the control part's reset step.
//
// Ports: clk, rst_n, state_in (128) in; state_out (128), first, last out.
module rolling_part_4sm #(
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
  logic [31:0] bytes_sel;

  rolling_ctrl #(.STEPS(4), .PHASE0(PHASE0)) u_ctrl (
    .clk, .rst_n, .step, .first, .last
  );

  cyclic_shifter u_shift (.x(state_in), .k({step, step}), .y(bytes_sel));

  for (genvar j = 0; j < 4; j++) begin : g_sm
    s_module #(.STEPS(4)) u_sm (
      .clk,
      .addr (bytes_sel[31 - 8*j -: 8]),
      .acc  (state_out[127 - 32*j -: 32])
    );
  end

endmodule
