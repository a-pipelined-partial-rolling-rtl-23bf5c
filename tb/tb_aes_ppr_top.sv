// tb_aes_ppr_top: end-to-end test of the PPR AES-128 core at its default
// configuration (rolling part 4SM).
//
// Encrypts the FIPS-197 Appendix B and Appendix C.1 vectors, then random
// plaintexts with a different random key for every block, first at the full
// block rate and then with random bubbles. Every ciphertext is compared, in
// order, with the reference model. Also checked: in_ready comes once every
// STEPS clocks, out_valid arrives a fixed 10*(STEPS+1) clocks after the block
// was taken, the ciphertext stays put for STEPS clocks, and no output appears
// for a bubble. The run counts the design's mechanisms (key change per block,
// back-to-back blocks at full rate, bubbles, a full pipeline) and fails if
// one of them never happened.
module tb_aes_ppr_top;
  import aes_ref_pkg::*;
  localparam int NUM_SM = 4;
  localparam int STEPS = 16 / NUM_SM;
  localparam int LATENCY = 10 * (STEPS + 1);
  localparam int NBLOCKS = 120;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_ready, in_valid, out_valid;
  logic [127:0] plaintext, key, ciphertext;

  typedef struct { bit [127:0] ct; int t_in; } exp_t;
  exp_t expq [$];
  int cyc = 0, last_ready = -1, accepted = 0, produced = 0;
  int n_keychange = 0, n_backtoback = 0, n_bubble = 0, max_inflight = 0, n_fips = 0;
  bit [127:0] prev_key;
  bit prev_slot_valid = 0;
  int hold = 0;
  bit [127:0] held_ct;

  always #5 clk = ~clk;

  aes_ppr_top dut (.clk, .rst_n, .in_ready, .in_valid, .plaintext, .key, .out_valid, .ciphertext);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (NBLOCKS * STEPS * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next input block: FIPS vectors first, then random with bubbles later on
  task automatic next_block();
    if (accepted == 0) begin
      plaintext <= 128'h3243f6a8885a308d313198a2e0370734; key <= 128'h2b7e151628aed2a6abf7158809cf4f3c;
      in_valid <= 1;
    end else if (accepted == 1) begin
      plaintext <= 128'h00112233445566778899aabbccddeeff; key <= 128'h000102030405060708090a0b0c0d0e0f;
      in_valid <= 1;
    end else begin
      plaintext <= rand128(); key <= rand128();
      in_valid <= (accepted < NBLOCKS / 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
    end
  endtask

  initial begin
    in_valid = 0; plaintext = '0; key = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    next_block();
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // input side
    if (in_ready) begin
      if (last_ready >= 0) check(cyc - last_ready == STEPS, "in_ready once per block period");
      last_ready = cyc;
      if (in_valid) begin
        exp_t e;
        e.ct = ref_encrypt(plaintext, key);
        e.t_in = cyc;
        expq.push_back(e);
        if (accepted > 0 && key != prev_key) n_keychange++;
        if (prev_slot_valid) n_backtoback++;
        prev_key = key;
        accepted++;
      end else begin
        n_bubble++;
      end
      prev_slot_valid = in_valid;
      if (accepted < NBLOCKS) next_block();
      else in_valid <= 0;
    end
    if (expq.size() > max_inflight) max_inflight = expq.size();
    // output side
    if (hold > 0) begin
      check(ciphertext == held_ct, "ciphertext held for a block period");
      hold--;
    end
    if (out_valid) begin
      if (expq.size() == 0) begin
        check(0, "out_valid with no block in flight");
      end else begin
        exp_t e;
        e = expq.pop_front();
        check(ciphertext == e.ct, $sformatf("block %0d: got %032h expected %032h", produced, ciphertext, e.ct));
        check(cyc - e.t_in == LATENCY + 1, $sformatf("latency %0d clocks", cyc - e.t_in - 1));
        if (produced == 0 && ciphertext == 128'h3925841d02dc09fbdc118597196a0b32) n_fips++;
        if (produced == 1 && ciphertext == 128'h69c4e0d86a7b0430d8cdb78070b4c55a) n_fips++;
        produced++;
        held_ct = ciphertext;
        hold = STEPS - 1;
      end
    end
    if (produced == NBLOCKS) begin
      check(n_fips == 2, "FIPS-197 vectors");
      check(n_keychange > 0, "key changed between blocks");
      check(n_backtoback > 0, "back-to-back blocks at full rate");
      check(n_bubble > 0, "bubbles");
      check(max_inflight >= 10, "pipeline full (ten or more blocks in flight)");
      $display("INFO blocks=%0d key_changes=%0d back_to_back=%0d bubbles=%0d max_in_flight=%0d latency=%0d",
               produced, n_keychange, n_backtoback, n_bubble, max_inflight, LATENCY);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
