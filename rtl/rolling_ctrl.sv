// rolling_ctrl: control part of a rolling part, a free-running step counter.
//
// Counts 0, 1, .., STEPS-1, 0, .. one step per clock. The rolling part turns
// the step into the shifter amount K = {step, step} (4SM: 0, 5, 10, 15) or
// the selector input Sel = step (8SM). `first` and `last` mark step 0 and
// step STEPS-1; the round unit uses them to load its pipeline register and
// the key registers. The counter resets to PHASE0 (synchronous, active low)
// so that consecutive rounds can run one clock apart.
//
// Ports: clk, rst_n in; step (2), first, last out. One register.
module rolling_ctrl #(
  parameter int unsigned STEPS  = 4,
  parameter int unsigned PHASE0 = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] step,
  output logic       first,
  output logic       last
);

  always_ff @(posedge clk) begin
    if (!rst_n)                         step <= 2'(PHASE0);
    else if (step == 2'(STEPS - 1))     step <= '0;
    else                                step <= step + 2'd1;
  end

  assign first = (step == 2'd0);
  assign last  = (step == 2'(STEPS - 1));

  // the step after the last one is always step 0
  assert property (@(posedge clk) disable iff (!rst_n) last |=> first)
    else $error("rolling_ctrl: step 0 does not follow the last step");

  initial begin
    assert (STEPS >= 2 && STEPS <= 4 && PHASE0 < STEPS)
      else $error("rolling_ctrl: STEPS must be 2..4 and PHASE0 below STEPS");
  end

endmodule
