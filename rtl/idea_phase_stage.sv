// idea_phase_stage: one IDEA phase as a stage of the phase-level pipeline.
//
// The phase (eight of them make up the cipher) combines the four 16-bit
// words X1..X4 of its input block with six subkeys Z1..Z6:
//   A = X1 (.) Z1   B = X2 + Z2   C = X3 + Z3   D = X4 (.) Z4
//   E = (A ^ C) (.) Z5            F = ((B ^ D) + E) (.) Z6
//   G = E + F
//   output = { A ^ F, C ^ F, B ^ G, D ^ G }   (middle words swapped)
// where (.) is multiplication modulo 2^16+1 and + is addition modulo 2^16.
//
// Only one multiplier is instantiated and it is used four times in turn, as
// in the phase-pipelined version of the design: one operation group per
// clock cycle, step by step:
//   step 0: A, B, C            (multiplier: X1, Z1)
//   step 1: D                  (multiplier: X4, Z4)
//   step 2: A ^ C, B ^ D
//   step 3: E                  (multiplier: A^C, Z5)
//   step 4: (B ^ D) + E
//   step 5: F                  (multiplier, Z6)
//   step 6: G = E + F
//   step 7: the four output XORs, combinational, taken by the next stage
// The grouping follows the published phase-pipelined algorithm, whose phase
// time is 4*mt + 2*at + 2*xt (mt, at, xt: time of one multiplication,
// addition, XOR); one clock cycle per group is this design's choice. The
// published execution-flow figure draws the step-5/6 pair as adder then
// multiplier; the data dependencies of the phase require the multiplier
// first, which is what is built.
//
// Interface and timing: `step` is a free-running count 0..7 shared by all
// stages. On the clock edge that ends step 7 (`advance`), the stage loads
// `in_block`/`in_valid` into its 64-bit pipeline register; during the next
// eight cycles it computes, and while step is 7 again `out_block` and
// `out_valid` hold its result for the next stage to load.
module idea_phase_stage
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  step_t       step,
  input  logic        advance,
  input  phase_keys_t z,          // z[0] = Z1 ... z[5] = Z6
  input  logic        in_valid,
  input  block_t      in_block,
  output logic        out_valid,
  output block_t      out_block
);
  block_t x_q;          // 64-bit pipeline register in front of the phase
  logic   valid_q;
  word_t  a_q, b_q, c_q, d_q, e_q, f_q;
  word_t  mul_a, mul_b, mul_p;

  idea_mul u_mul (.a(mul_a), .b(mul_b), .p(mul_p));

  // Multiplier operand selection per step.
  always_comb begin
    unique case (step)
      step_t'(0): begin mul_a = blk_word(x_q, 1); mul_b = z[0]; end
      step_t'(1): begin mul_a = blk_word(x_q, 4); mul_b = z[3]; end
      step_t'(3): begin mul_a = e_q;              mul_b = z[4]; end
      step_t'(5): begin mul_a = f_q;              mul_b = z[5]; end
      default:    begin mul_a = e_q;              mul_b = z[4]; end
    endcase
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
    unique case (step)
      step_t'(0): begin
        a_q <= mul_p;
        b_q <= blk_word(x_q, 2) + z[1];
        c_q <= blk_word(x_q, 3) + z[2];
      end
      step_t'(1): d_q <= mul_p;
      step_t'(2): begin
        e_q <= a_q ^ c_q;
        f_q <= b_q ^ d_q;
      end
      step_t'(3): e_q <= mul_p;
      step_t'(4): f_q <= f_q + e_q;
      step_t'(5): f_q <= mul_p;
      step_t'(6): e_q <= e_q + f_q;
      default: ;
    endcase
  end

  assign out_block = {a_q ^ f_q, c_q ^ f_q, b_q ^ e_q, d_q ^ e_q};
  assign out_valid = valid_q;
endmodule
