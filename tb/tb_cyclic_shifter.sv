// tb_cyclic_shifter: checks the 4SM byte selection for all 16 shift values on
// random states, and the four selections of the worked 4SM example
// (state 00 10 20 30 01 11 .. 33, K = 0, 5, 10, 15).
module tb_cyclic_shifter;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] x;
  logic [3:0]   k;
  logic [31:0]  y;

  cyclic_shifter dut (.x, .k, .y);

  task automatic check(bit [31:0] exp, string what);
    checks++;
    if (y !== exp) begin
      failures++; $display("FAIL %s: got %08h expected %08h", what, y, exp);
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
    x = 128'h00102030011121310212223203132333;
    k = 4'd0;  #1; check(32'h00010203, "example K=0");
    k = 4'd5;  #1; check(32'h11121310, "example K=5");
    k = 4'd10; #1; check(32'h22232021, "example K=10");
    k = 4'd15; #1; check(32'h33303132, "example K=15");
    for (int n = 0; n < 50; n++) begin
      bit [127:0] sr;
      x = rand128();
      sr = ref_shiftrows(x);
      for (int kk = 0; kk < 16; kk++) begin
        k = 4'(kk); #1;
        check({get_b(x, kk), get_b(x, (kk+4)%16), get_b(x, (kk+8)%16), get_b(x, (kk+12)%16)},
              $sformatf("random K=%0d", kk));
      end
      // K = 5r selects row r of the ShiftRows result
      for (int r = 0; r < 4; r++) begin
        k = 4'(5*r); #1;
        check({get_b(sr, r), get_b(sr, 4+r), get_b(sr, 8+r), get_b(sr, 12+r)}, "row of ShiftRows");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
