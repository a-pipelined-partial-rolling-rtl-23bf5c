// tb_rolling_part_4sm: runs the worked 4SM example (state 00 10 20 30 .. 33,
// expected SubBytes+ShiftRows 63 82 93 c3 7c c9 26 04 77 7d b7 c7 7b ca fd 23)
// and then random states back to back, one every four clocks. Checks the four
// bytes stored at every step, the complete result in the clock after the
// fourth step, and the step flags.
module tb_rolling_part_4sm;
  import aes_ref_pkg::*;
  localparam int STEPS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [127:0] state_in, state_out;
  logic first, last;
  bit [127:0] cur, prev;
  bit         have_prev = 0;
  bit [7:0]   exp_low [4];
  bit         exp_low_ok = 0;
  int         nblocks = 0, step_cnt = 0;
  // bytes the example shows stored by the four S-Modules in steps 1..4
  bit [31:0]  ex_steps [4] = '{32'h637c777b, 32'h82c97dca, 32'h9326b7fd, 32'hc304c723};

  always #5 clk = ~clk;

  rolling_part_4sm #(.PHASE0(0)) dut (.clk, .rst_n, .state_in, .state_out, .first, .last);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = 128'h00102030011121310212223203132333;
    state_in = cur;
    repeat (2) @(posedge clk);
    rst_n <= 1;
  end

  always @(posedge clk) if (rst_n) begin
    // bytes stored at this edge: S-box of row `step` of ShiftRows(state_in)
    if (exp_low_ok)
      for (int j = 0; j < 4; j++)
        check(state_out[127 - 32*j - 24 -: 8] == exp_low[j], $sformatf("stored byte col %0d", j));
    for (int j = 0; j < 4; j++)
      exp_low[j] = ref_sbox(get_b(state_in, (5*int'(dut.step) + 4*j) % 16));
    exp_low_ok = 1;
    check(first == (dut.step == 0) && last == (dut.step == STEPS - 1), "step flags");
    if (nblocks == 0) begin
      bit [31:0] stored;
      stored = {state_out[103:96], state_out[71:64], state_out[39:32], state_out[7:0]};
      if (step_cnt >= 1 && step_cnt <= 4)
        check(stored == ex_steps[step_cnt-1], $sformatf("example step %0d stored %08h", step_cnt, stored));
      step_cnt++;
    end
    if (first && have_prev) begin
      check(state_out == ref_shiftrows(ref_subbytes(prev)), $sformatf("block result %032h", state_out));
      if (nblocks == 1)
        check(state_out == 128'h638293c37cc92604777db7c77bcafd23, "example result");
    end
    if (last) begin
      prev = cur; have_prev = 1; nblocks++;
      cur = rand128();
      state_in <= cur;
      if (nblocks == 40) begin
        $display("INFO blocks=%0d", nblocks);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
