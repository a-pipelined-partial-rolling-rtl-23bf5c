// tb_s_module: drives random bytes into S-Modules with 4-byte and 2-byte
// registers and checks after every clock that the register holds the S-box
// values of the last STEPS bytes, oldest first.
module tb_s_module;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0]  addr;
  logic [31:0] acc4;
  logic [15:0] acc2;
  bit   [7:0]  hist [4];

  always #5 clk = ~clk;

  s_module #(.STEPS(4)) dut4 (.clk, .addr, .acc(acc4));
  s_module #(.STEPS(2)) dut2 (.clk, .addr, .acc(acc2));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      addr = 8'($urandom);
      hist = '{hist[1], hist[2], hist[3], ref_sbox(addr)};
      @(posedge clk); #1;
      if (n >= 3) begin
        checks++;
        if (acc4 !== {hist[0], hist[1], hist[2], hist[3]}) begin
          failures++; $display("FAIL step %0d: acc4 %08h", n, acc4);
        end
      end
      if (n >= 1) begin
        checks++;
        if (acc2 !== {hist[2], hist[3]}) begin
          failures++; $display("FAIL step %0d: acc2 %04h", n, acc2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
