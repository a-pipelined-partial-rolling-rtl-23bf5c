// tb_key_expansion: runs the ten-round online key expansion with the load
// strobes of a 4-step pipeline (round r's steps one clock after round r-1's)
// and a new cipher key every block period, bubbles included. Checks all ten
// FIPS-197 Appendix A.1 round keys and, for every valid block, each round key
// against the reference schedule while it is held.
module tb_key_expansion;
  import aes_ref_pkg::*;
  localparam int NR = 10, STEPS = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [127:0] key_in;
  logic valid_in;
  logic [NR-1:0] ld_a, ld_b, valid;
  logic [NR*128-1:0] round_keys;
  int t = 0;
  // shadow of which block each register holds
  int id_in, idA [NR], idB [NR];
  bit [127:0] keys [$];
  bit [127:0] fips [NR] = '{
    128'ha0fafe1788542cb123a339392a6c7605, 128'hf2c295f27a96b9435935807a7359f67f,
    128'h3d80477d4716fe3e1e237e446d7a883b, 128'hef44a541a8525b7fb671253bdb0bad00,
    128'hd4d1c6f87c839d87caf2b8bc11f915bc, 128'h6d88a37a110b3efddbf98641ca0093fd,
    128'h4e54f70e5f5fc9f384a64fb24ea6dc4f, 128'head27321b58dbad2312bf5607f8d292f,
    128'hac7766f319fadc2128d12941575c006e, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6};
  int fips_seen = 0, bubbles = 0, valid_blocks = 0;

  always #5 clk = ~clk;

  key_expansion #(.NR(NR)) dut (.clk, .rst_n, .key_in, .valid_in, .ld_a, .ld_b, .round_keys, .valid);

  always_comb
    for (int r = 0; r < NR; r++) begin
      ld_a[r] = ((t - r) % STEPS + STEPS) % STEPS == STEPS - 1;
      ld_b[r] = ((t - r) % STEPS + STEPS) % STEPS == 0;
    end

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
    key_in = 128'h2b7e151628aed2a6abf7158809cf4f3c; valid_in = 1; id_in = 0;
    keys.push_back(key_in);
    for (int r = 0; r < NR; r++) begin idA[r] = -1; idB[r] = -1; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
  end

  always @(posedge clk) if (rst_n) begin
    // checks of what is held now
    for (int r = 0; r < NR; r++) begin
      if (idB[r] >= 0) begin
        bit [127:0] k;
        k = keys[idB[r]];
        for (int i = 1; i <= r + 1; i++) k = ref_next_key(k, i);
        check(valid[r], $sformatf("round %0d valid", r + 1));
        check(round_keys[128*r +: 128] == k, $sformatf("round %0d key block %0d", r + 1, idB[r]));
        if (idB[r] == 0) begin
          check(round_keys[128*r +: 128] == fips[r], $sformatf("FIPS round key %0d", r + 1));
          if (ld_b[r]) fips_seen++;
        end
      end else if (idB[r] == -2) begin
        check(!valid[r], "bubble not valid");
      end
    end
    // shadow registers
    for (int r = NR - 1; r >= 0; r--) begin
      if (ld_b[r]) idB[r] = idA[r];
      if (ld_a[r]) idA[r] = (r == 0) ? id_in : idB[r-1];
    end
    // input register loads with round 1's register A
    if (ld_a[0]) begin
      if (valid_in) valid_blocks++; else bubbles++;
      if (keys.size() >= 30) begin
        check(fips_seen == NR, "all FIPS round keys seen");
        check(bubbles > 0, "a bubble passed");
        $display("INFO blocks=%0d bubbles=%0d", valid_blocks, bubbles);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      if ($urandom_range(0, 4) == 0) begin
        valid_in <= 0; id_in = -2;
        key_in <= rand128();
      end else begin
        bit [127:0] k;
        k = rand128();
        keys.push_back(k);
        id_in = keys.size() - 1;
        key_in <= k; valid_in <= 1;
      end
    end
    t <= t + 1;
  end
endmodule
