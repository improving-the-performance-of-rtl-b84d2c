// tb_idea_pipe_core: end-to-end check of the phase-pipelined core.
//   1. the published IDEA test vector: key 0001 0002 ... 0008, plaintext
//      0000 0001 0002 0003 gives 11FB ED2B 0198 6DE5 (subkeys from the
//      reference key schedule);
//   2. 400 random blocks under random subkeys, first back to back, then with
//      random gaps (bubbles);
//   3. decryption of ciphertexts with the reference decryption subkeys.
// Every output is compared, in order, with the reference cipher. Timing
// checks: a block leaves 72 cycles (nine phase times of 8 cycles) after it
// was accepted, and back-to-back blocks come out 8 cycles apart.
module tb_idea_pipe_core;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;             // a real falling edge for the asynchronous reset
  subkeys_t subkeys;
  logic     in_valid = 1'b0;
  block_t   in_block = '0;
  logic     in_ready, out_valid;
  block_t   out_block;

  idea_pipe_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  block_t exp_q[$];
  longint acc_q[$];
  longint last_out = -1;
  int back_to_back = 0, bubbles = 0, n_out = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && in_ready) begin
      if (in_valid) begin
        acc_q.push_back(cycle);
      end else bubbles++;
    end
    if (out_valid) begin
      longint t0;
      block_t e;
      n_out++;
      checks += 2;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_block);
      end else begin
        e  = exp_q.pop_front();
        t0 = acc_q.pop_front();
        if (out_block !== e) begin
          failures++;
          if (failures < 10) $display("FAIL out %h expected %h", out_block, e);
        end
        // taken at edge t0, loaded into the output register at edge t0+72,
        // so sampled here at edge t0+73
        if (cycle - t0 != 73) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cycle - t0 - 1);
        end
      end
      if (last_out >= 0 && cycle - last_out == 8) back_to_back++;
      last_out = cycle;
    end
  end

  // Offer one block; returns once it was taken.
  task automatic send(block_t blk, block_t expected);
    @(negedge clk);
    in_valid = 1'b1;
    in_block = blk;
    exp_q.push_back(expected);
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    repeat (100) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key;
    keys_t        ek, dk;
    block_t       pt [200];
    block_t       ct [200];

    key = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    subkeys = ref_enc_keys(key);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(64'h0000_0001_0002_0003, 64'h11FB_ED2B_0198_6DE5);
    drain();

    // random subkeys, back-to-back stream
    for (int i = 0; i < 52; i++) subkeys[i] = 16'($urandom);
    subkeys[0] = '0;                      // a 2^16 subkey
    for (int i = 0; i < 200; i++) begin
      block_t x;
      x = {$urandom, $urandom};
      send(x, ref_cipher(x, subkeys));
    end
    // same keys, random gaps
    for (int i = 0; i < 200; i++) begin
      block_t x;
      x = {$urandom, $urandom};
      repeat ($urandom_range(0, 20)) @(posedge clk);
      send(x, ref_cipher(x, subkeys));
    end
    drain();

    // encrypt under a random key, then decrypt with the decryption subkeys
    key = {$urandom, $urandom, $urandom, $urandom};
    ek  = ref_enc_keys(key);
    dk  = ref_dec_keys(ek);
    for (int i = 0; i < 200; i++) begin
      pt[i] = {$urandom, $urandom};
      ct[i] = ref_cipher(pt[i], ek);
    end
    subkeys = dk;
    for (int i = 0; i < 200; i++) send(ct[i], pt[i]);
    drain();

    checks++;
    if (exp_q.size() != 0 || n_out != 601) begin
      failures++;
      $display("FAIL %0d outputs, %0d missing", n_out, exp_q.size());
    end
    checks++;
    if (back_to_back < 300 || bubbles == 0) begin
      failures++;
      $display("FAIL back-to-back outputs %0d, bubbles %0d", back_to_back, bubbles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
