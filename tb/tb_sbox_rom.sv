// tb_sbox_rom: checks all 256 entries of the S-box ROM against the reference
// model and three FIPS-197 table values.
module tb_sbox_rom;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] addr, data;

  sbox_rom dut (.addr, .data);

  task automatic check(bit [7:0] got, bit [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
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
    for (int x = 0; x < 256; x++) begin
      addr = 8'(x);
      #1;
      check(data, ref_sbox(8'(x)), $sformatf("sbox[%02h]", x));
    end
    addr = 8'h00; #1; check(data, 8'h63, "FIPS S(00)");
    addr = 8'h53; #1; check(data, 8'hed, "FIPS S(53)");
    addr = 8'hff; #1; check(data, 8'h16, "FIPS S(ff)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
