// tb_round_unit: runs a middle round with rolling part 4SM and a final round
// (no MixColumns) with rolling part 8SM on random states and keys, a new block
// every block period, with each round key changed together with the pipeline
// register the way the round key circuit does it. Checks every round output
// against the reference round function while it is stable, and that the
// pipeline register loads exactly one clock after the last rolling step.
module tb_round_unit;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

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
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (400) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- middle round, 4SM ----------------
  logic [127:0] a_in, a_key, a_out;
  logic a_last, a_load, a_last_q;
  bit [127:0] a_cur, a_done, a_done_key, a_loaded, a_loaded_key, a_next_key;
  int a_rolled = 0, a_loads = 0;

  round_unit #(.NUM_SM(4), .FINAL(1'b0), .PHASE0(0)) dut_a (
    .clk, .rst_n, .state_in(a_in), .round_key(a_key), .state_out(a_out),
    .roll_last(a_last), .preg_load(a_load));

  initial begin a_cur = rand128(); a_in = a_cur; a_next_key = rand128(); end

  always @(posedge clk) if (rst_n) begin
    if (cyc > 0) check(a_load == a_last_q, "4SM: pipeline load one clock after last step");
    a_last_q = a_last;
    if (a_last && a_loads >= 1)
      check(a_out == ref_round(a_loaded, a_loaded_key, 1'b0), $sformatf("4SM round out %032h", a_out));
    if (a_load && a_rolled >= 1) begin
      a_loaded = a_done; a_loaded_key = a_done_key; a_loads++;
      a_key <= a_done_key;
    end
    if (a_last) begin
      a_done = a_cur; a_done_key = a_next_key; a_rolled++;
      a_cur = rand128(); a_next_key = rand128();
      a_in <= a_cur;
    end
  end

  // ---------------- final round, 8SM ----------------
  logic [127:0] b_in, b_key, b_out;
  logic b_last, b_load, b_last_q;
  bit [127:0] b_cur, b_done, b_done_key, b_loaded, b_loaded_key, b_next_key;
  int b_rolled = -1, b_loads = 0;  // first block only sees step 1

  round_unit #(.NUM_SM(8), .FINAL(1'b1), .PHASE0(1)) dut_b (
    .clk, .rst_n, .state_in(b_in), .round_key(b_key), .state_out(b_out),
    .roll_last(b_last), .preg_load(b_load));

  initial begin b_cur = rand128(); b_in = b_cur; b_next_key = rand128(); end

  always @(posedge clk) if (rst_n) begin
    if (cyc > 0) check(b_load == b_last_q, "8SM: pipeline load one clock after last step");
    b_last_q = b_last;
    if (b_last && b_loads >= 1)
      check(b_out == ref_round(b_loaded, b_loaded_key, 1'b1), $sformatf("8SM final round out %032h", b_out));
    if (b_load && b_rolled >= 1) begin
      b_loaded = b_done; b_loaded_key = b_done_key; b_loads++;
      b_key <= b_done_key;
    end
    if (b_last) begin
      b_done = b_cur; b_done_key = b_next_key; b_rolled++;
      b_cur = rand128(); b_next_key = rand128();
      b_in <= b_cur;
    end
  end
endmodule
