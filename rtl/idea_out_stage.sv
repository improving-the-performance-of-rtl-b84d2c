// idea_out_stage: the IDEA transformation phase as the last pipeline stage.
//
// It takes the output X1..X4 of the eighth phase and four subkeys Z1..Z4 and
// forms { X1 (.) Z1, X3 + Z2, X2 + Z3, X4 (.) Z4 }: the middle words cross
// back, undoing the swap at the end of every phase. (.) is multiplication
// modulo 2^16+1 and + addition modulo 2^16.
//
// Like the phase stages it owns a single multiplier, used in two steps:
//   step 0: X1 (.) Z1, X3 + Z2, X2 + Z3
//   step 1: X4 (.) Z4
// and then holds its result until the end of step 7. The single multiplier
// in this stage is this design's choice, made to match the phase stages.
//
// Interface and timing: as idea_phase_stage. The block is loaded on the
// `advance` edge (end of step 7); `out_block`/`out_valid` are stable from
// step 2 on and are meant to be taken on the next `advance` edge.
module idea_out_stage
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  step_t       step,
  input  logic        advance,
  input  final_keys_t z,          // z[0] = Z1 ... z[3] = Z4 of phase 9
  input  logic        in_valid,
  input  block_t      in_block,
  output logic        out_valid,
  output block_t      out_block
);
  block_t x_q;
  logic   valid_q;
  word_t  y1_q, y2_q, y3_q, y4_q;
  word_t  mul_a, mul_b, mul_p;

  idea_mul u_mul (.a(mul_a), .b(mul_b), .p(mul_p));

  always_comb begin
    if (step == step_t'(1)) begin
      mul_a = blk_word(x_q, 4);
      mul_b = z[3];
    end else begin
      mul_a = blk_word(x_q, 1);
      mul_b = z[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      valid_q <= 1'b0;
    end else if (advance) begin
      x_q     <= in_block;
      valid_q <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (step == step_t'(0)) begin
      y1_q <= mul_p;
      y2_q <= blk_word(x_q, 3) + z[1];
      y3_q <= blk_word(x_q, 2) + z[2];
    end else if (step == step_t'(1)) begin
      y4_q <= mul_p;
    end
  end

  assign out_block = {y1_q, y2_q, y3_q, y4_q};
  assign out_valid = valid_q;
endmodule
