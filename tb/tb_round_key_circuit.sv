// tb_round_key_circuit: checks round 1 and round 10 of the FIPS-197
// Appendix A.1 key schedule and random keys, that the result moves from
// register A to the output only on ld_b, and that the valid flag follows.
module tb_round_key_circuit;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [127:0] k_in, k1_out, k10_out;
  logic v_in, ld_a = 0, ld_b = 0, v1_out, v10_out;

  always #5 clk = ~clk;

  round_key_circuit #(.RCON(8'h01)) dut1  (.clk, .rst_n, .key_in(k_in), .valid_in(v_in),
    .ld_a, .ld_b, .key_out(k1_out), .valid_out(v1_out));
  round_key_circuit #(.RCON(8'h36)) dut10 (.clk, .rst_n, .key_in(k_in), .valid_in(v_in),
    .ld_a, .ld_b, .key_out(k10_out), .valid_out(v10_out));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit [127:0] k, bit v, bit [127:0] e1, bit [127:0] e10);
    bit [127:0] old1 = k1_out;
    bit vold = v1_out;
    @(negedge clk); k_in = k; v_in = v; ld_a = 1;
    @(negedge clk); ld_a = 0; k_in = rand128(); v_in = ~v;
    check(k1_out == old1 && v1_out == vold, "output held until ld_b");
    @(negedge clk); ld_b = 1;
    @(negedge clk); ld_b = 0;
    check(v1_out == v && v10_out == v, "valid follows");
    check(k1_out == e1, $sformatf("rcon 01: got %032h expected %032h", k1_out, e1));
    check(k10_out == e10, $sformatf("rcon 36: got %032h expected %032h", k10_out, e10));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k_in = '0; v_in = 0;
    repeat (2) @(posedge clk);
    #1;
    check(v1_out == 0 && v10_out == 0, "valid cleared by reset");
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b1,
        128'ha0fafe1788542cb123a339392a6c7605, ref_next_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 10));
    run(128'hac7766f319fadc2128d12941575c006e, 1'b0,
        ref_next_key(128'hac7766f319fadc2128d12941575c006e, 1), 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int n = 0; n < 100; n++) begin
      bit [127:0] k;
      k = rand128();
      run(k, 1'(n), ref_next_key(k, 1), ref_next_key(k, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
