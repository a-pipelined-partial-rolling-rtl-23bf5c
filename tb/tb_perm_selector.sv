// tb_perm_selector: checks the 8SM permutation network and selector against
// the byte table X0 X10 X4 X14 X8 X2 X12 X6 | X5 X15 X9 X3 X13 X7 X1 X11 and
// against rows 0/2 and 1/3 of the reference ShiftRows, on random states.
module tb_perm_selector;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] x;
  logic         sel;
  logic [63:0]  y;
  int tab [16] = '{0, 10, 4, 14, 8, 2, 12, 6, 5, 15, 9, 3, 13, 7, 1, 11};

  perm_selector dut (.x, .sel, .y);

  task automatic check(bit [63:0] exp, string what);
    checks++;
    if (y !== exp) begin
      failures++; $display("FAIL %s: got %016h expected %016h", what, y, exp);
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
    for (int n = 0; n < 200; n++) begin
      bit [63:0] e0, e1, r02, r13;
      bit [127:0] sr;
      x = rand128();
      sr = ref_shiftrows(x);
      for (int i = 0; i < 8; i++) begin
        e0[63 - 8*i -: 8] = get_b(x, tab[i]);
        e1[63 - 8*i -: 8] = get_b(x, tab[8 + i]);
      end
      for (int c = 0; c < 4; c++) begin
        r02[63 - 16*c -: 16] = {get_b(sr, 4*c + 0), get_b(sr, 4*c + 2)};
        r13[63 - 16*c -: 16] = {get_b(sr, 4*c + 1), get_b(sr, 4*c + 3)};
      end
      sel = 0; #1; check(e0, "sel=0 table"); check(r02, "sel=0 rows 0/2");
      sel = 1; #1; check(e1, "sel=1 table"); check(r13, "sel=1 rows 1/3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
