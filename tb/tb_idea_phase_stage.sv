// tb_idea_phase_stage: drives one phase stage with the shared 0..7 step
// count, loads a random block and random subkeys every eight cycles (with
// some bubbles) and checks, in the step-7 cycle of the next phase time,
// that the stage offers the reference phase output and the right valid bit.
// This also checks the phase time: the result must be ready exactly eight
// cycles after the block was loaded. Operand 0 (2^16) is forced into the
// multiplier inputs in some rounds.
module tb_idea_phase_stage;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;             // a real falling edge for the asynchronous reset
  step_t       step = '0;
  logic        advance;
  phase_keys_t z;
  logic        in_valid;
  block_t      in_block;
  logic        out_valid;
  block_t      out_block;
  int checks = 0, failures = 0, bubbles = 0, zero_ops = 0;

  idea_phase_stage dut (.*);

  always #5 clk = ~clk;
  assign advance = (step == 3'd7);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t exp_block;
    logic   exp_valid;
    in_valid = 1'b0; in_block = '0; z = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Align so that the first loop iteration sets inputs during step 7.
    while (step != 3'd7) begin @(posedge clk); step <= step + 3'd1; #1; end
    exp_valid = 1'b0;
    exp_block = '0;
    for (int n = 0; n < 1500; n++) begin
      // now in a step-7 cycle: check the previous block, offer the next one
      if (n > 0) begin
        checks++;
        if (out_valid !== exp_valid || (exp_valid && out_block !== exp_block)) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %h/%b exp %h/%b", n, out_block, out_valid, exp_block, exp_valid);
        end
      end
      in_valid = ($urandom_range(0, 7) != 0);
      in_block = {$urandom, $urandom};
      for (int k = 0; k < 6; k++) z[k] = 16'($urandom);
      if (n % 5 == 1) begin in_block[63:48] = '0; z[0] = '0; zero_ops++; end
      if (n % 7 == 2) begin z[3] = '0; z[4] = '0; z[5] = '0; zero_ops++; end
      if (!in_valid) bubbles++;
      exp_valid = in_valid;
      exp_block = ref_phase(in_block, z);
      repeat (8) begin @(posedge clk); step <= step + 3'd1; #1; end
    end
    if (bubbles == 0 || zero_ops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
