// tb_rolling_ctrl: checks the step sequence, the first/last flags and the
// reset phase of control parts with 4 and 2 steps.
module tb_rolling_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] s4, s4p, s2;
  logic f4, l4, f4p, l4p, f2, l2;

  always #5 clk = ~clk;

  rolling_ctrl #(.STEPS(4), .PHASE0(0)) d4  (.clk, .rst_n, .step(s4),  .first(f4),  .last(l4));
  rolling_ctrl #(.STEPS(4), .PHASE0(3)) d4p (.clk, .rst_n, .step(s4p), .first(f4p), .last(l4p));
  rolling_ctrl #(.STEPS(2), .PHASE0(1)) d2  (.clk, .rst_n, .step(s2),  .first(f2),  .last(l2));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      check(s4 == 2'(t % 4), $sformatf("4-step t=%0d step=%0d", t, s4));
      check(s4p == 2'((t + 3) % 4), "4-step phase 3");
      check(s2 == 2'((t + 1) % 2), "2-step phase 1");
      check(f4 == (s4 == 0) && l4 == (s4 == 3), "4-step flags");
      check(f2 == (s2 == 0) && l2 == (s2 == 1), "2-step flags");
      check(f4p == (s4p == 0) && l4p == (s4p == 3), "4-step phase 3 flags");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
