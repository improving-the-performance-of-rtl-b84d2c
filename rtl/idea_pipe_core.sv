// idea_pipe_core: phase-pipelined IDEA computation module.
//
// Eight idea_phase_stage instances and one idea_out_stage are chained, each
// with a 64-bit pipeline register in front of it (held inside the stage).
// All stages share one step counter that runs 0..7 without stopping; on the
// edge that ends step 7 every block moves one stage on and a new block may
// enter. A new block is therefore accepted, and a finished block delivered,
// once every phase time of eight cycles, and a block needs nine phase times
// (72 cycles) from entry to exit. Cycles without an input block carry a
// bubble (valid bit low) through the pipeline.
//
// The phase-level pipeline, the 64-bit registers between phases and the
// single multiplier per phase follow the published design. The step counter, the
// valid bits and the output register are this design's choices.
//
// Interface:
//   in_ready  high during step 7; a block offered with in_valid in that
//             cycle is taken at the end of it. With in_valid low a bubble
//             enters instead. There is no back-pressure on the output.
//   out_valid one-cycle pulse, the cycle after the block left the
//             transformation stage; out_block holds it until the next one.
//   subkeys   the 52 subkeys (encryption or decryption); they must be
//             stable while blocks are in flight.
module idea_pipe_core
  import idea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  subkeys_t subkeys,
  input  logic     in_valid,
  input  block_t   in_block,
  output logic     in_ready,
  output logic     out_valid,
  output block_t   out_block
);
  step_t  step_q;
  logic   advance;
  logic   [NUM_PHASES:0] v;     // v[i]: valid into stage i (i = NUM_PHASES: into the transformation stage)
  block_t                b [NUM_PHASES+1];
  logic   tp_valid;
  block_t tp_block;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_q <= '0;
    else        step_q <= step_q + step_t'(1);
  end

  assign advance  = (step_q == step_t'(PHASE_STEPS-1));
  assign in_ready = advance;
  assign v[0]     = in_valid;
  assign b[0]     = in_block;

  for (genvar i = 0; i < NUM_PHASES; i++) begin : g_phase
    idea_phase_stage u_phase (
      .clk      (clk),
      .rst_n    (rst_n),
      .step     (step_q),
      .advance  (advance),
      .z        (subkeys[KEYS_PER_PHASE*i +: KEYS_PER_PHASE]),
      .in_valid (v[i]),
      .in_block (b[i]),
      .out_valid(v[i+1]),
      .out_block(b[i+1])
    );
  end

  idea_out_stage u_final (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (step_q),
    .advance  (advance),
    .z        (subkeys[KEYS_PER_PHASE*NUM_PHASES +: 4]),
    .in_valid (v[NUM_PHASES]),
    .in_block (b[NUM_PHASES]),
    .out_valid(tp_valid),
    .out_block(tp_block)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      out_valid <= advance && tp_valid;
      if (advance && tp_valid) out_block <= tp_block;
    end
  end
endmodule
