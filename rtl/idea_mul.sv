// idea_mul: multiplier modulo 2^16+1, the IDEA "(.)" operator.
//
// Operands and result are 16-bit words in which 0 stands for 2^16. The
// reduction is the Low-High method: for a, b both non-zero the 32-bit product
// p is split into its low and high halves and the result is
// lo - hi (mod 2^16), plus one when lo < hi (a borrow). A zero operand stands
// for 2^16 = -1 (mod 2^16+1), so the result is then 1 - other (mod 2^16),
// which also covers 0 (.) 0 = 1.
//
// The operator and the choice of the Low-High method follow the published
// design, which does not spell the method out; the exact formulation,
// including the zero-operand cases, is the one commonly used with it.
//
// Purely combinational: the result is valid in the same cycle as the inputs.
module idea_mul
  import idea_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t p
);
  logic [2*WORD_W-1:0] prod;
  word_t               lo, hi;

  always_comb begin
    prod = a * b;
    lo   = prod[WORD_W-1:0];
    hi   = prod[2*WORD_W-1:WORD_W];
    if (a == '0)
      p = word_t'(1) - b;
    else if (b == '0)
      p = word_t'(1) - a;
    else
      p = lo - hi + word_t'(lo < hi);
  end
endmodule
