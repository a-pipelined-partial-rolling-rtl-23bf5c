// tb_rolling_part_8sm: feeds the 8SM rolling part the example state
// 00 10 20 30 .. 33 and then random states back to back, one every two
// clocks. Checks the eight bytes stored at every step (rows 0/2, then rows
// 1/3 of the ShiftRows result, substituted), the complete result in the
// clock after the second step, and the step flags.
module tb_rolling_part_8sm;
  import aes_ref_pkg::*;
  localparam int STEPS = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [127:0] state_in, state_out;
  logic first, last;
  bit [127:0] cur, prev;
  bit         have_prev = 0;
  bit [7:0]   exp_low [8];
  bit         exp_low_ok = 0;
  int         nblocks = 0;

  always #5 clk = ~clk;

  rolling_part_8sm #(.PHASE0(0)) dut (.clk, .rst_n, .state_in, .state_out, .first, .last);

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
    bit [127:0] sr;
    if (exp_low_ok)
      for (int j = 0; j < 8; j++)
        check(state_out[127 - 16*j - 8 -: 8] == exp_low[j], $sformatf("stored byte SM %0d", j));
    // step s: SM 2c gets row s of column c, SM 2c+1 row s+2
    sr = ref_shiftrows(state_in);
    for (int c = 0; c < 4; c++) begin
      exp_low[2*c]     = ref_sbox(get_b(sr, 4*c + int'(dut.step[0])));
      exp_low[2*c + 1] = ref_sbox(get_b(sr, 4*c + 2 + int'(dut.step[0])));
    end
    exp_low_ok = 1;
    check(first == (dut.step == 0) && last == (dut.step == STEPS - 1), "step flags");
    if (first && have_prev) begin
      check(state_out == ref_shiftrows(ref_subbytes(prev)), $sformatf("block result %032h", state_out));
      if (nblocks == 1)
        check(state_out == 128'h638293c37cc92604777db7c77bcafd23, "example result");
    end
    if (last) begin
      prev = cur; have_prev = 1; nblocks++;
      cur = rand128();
      state_in <= cur;
      if (nblocks == 60) begin
        $display("INFO blocks=%0d", nblocks);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
