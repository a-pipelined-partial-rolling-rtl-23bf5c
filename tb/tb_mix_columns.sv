// tb_mix_columns: checks MixColumns on the FIPS-197 round-1 example column
// set and on random states against the reference model.
module tb_mix_columns;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] state_in, state_out;

  mix_columns dut (.state_in, .state_out);

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
    // FIPS-197 Appendix B, round 1: after ShiftRows -> after MixColumns
    state_in = 128'hd4bf5d30e0b452aeb84111f11e2798e5; #1;
    check(128'h046681e5e0cb199a48f8d37a2806264c, "FIPS-197 round 1");
    state_in = 128'hdb135345f20a225c01010101c6c6c6c6; #1;
    check(128'h8e4da1bc9fdc589d01010101c6c6c6c6, "known columns");
    for (int n = 0; n < 300; n++) begin
      state_in = rand128(); #1;
      check(ref_mixcolumns(state_in), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
