// tb_add_round_key: checks the FIPS-197 round-0 AddRoundKey and random XORs.
module tb_add_round_key;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] state_in, round_key, state_out;

  add_round_key dut (.state_in, .round_key, .state_out);

  task automatic check(bit [127:0] exp, string what);
    checks++;
    if (state_out !== exp) begin
      failures++; $display("FAIL %s: got %032h expected %032h", what, state_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_in  = 128'h3243f6a8885a308d313198a2e0370734;
    round_key = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    check(128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS-197 round 0");
    for (int n = 0; n < 300; n++) begin
      bit [127:0] e;
      state_in = rand128(); round_key = rand128(); #1;
      for (int i = 0; i < 128; i++) e[i] = (state_in[i] != round_key[i]);
      check(e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
