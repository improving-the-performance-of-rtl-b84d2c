// idea_keysched: generates the 52 16-bit subkeys from the 128-bit IDEA key.
//
// Encryption subkeys: the key is cut into eight 16-bit words, most
// significant first, and rotated left by 25 bits before the next eight are
// cut (idea_pkg::expand_key). They are ready the cycle after `start`.
//
// Decryption subkeys run the same datapath backwards: for decryption phase r
// (r = 1..9, taking encryption phase 10-r)
//   Z1 = inverse of Z1 modulo 2^16+1,  Z4 = inverse of Z4,
//   Z2, Z3 = additive inverses of Z2, Z3 (swapped for r = 2..8),
//   Z5, Z6 = Z5, Z6 of encryption phase 9-r (phases 1..8 only).
// The 18 multiplicative inverses are computed one after the other with a
// single idea_mul as x^(2^16-1) (Fermat; 2^16+1 is prime), by 15 rounds of
// square-then-multiply: 30 multiplier cycles plus one load cycle per
// inverse, 559 cycles in all from start to done. The zero word (2^16) is its own inverse,
// which this gives without a special case.
//
// The published design states only that the 128-bit key yields 52 subkeys
// of 16 bits and that the algorithm codes and decodes; the schedule is the standard
// IDEA one, and generating it on chip, with this sequencing, is this
// design's choice.
//
// Interface: pulse `start` with `key` and `decrypt` valid while `busy` is
// low. `busy` is high until the subkeys are complete; `done` pulses for one
// cycle when `subkeys` holds the new schedule. `subkeys` is held until the
// next start.
module idea_keysched
  import idea_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     decrypt,
  input  key_t     key,
  output logic     busy,
  output logic     done,
  output subkeys_t subkeys
);
  typedef enum logic [1:0] {KS_IDLE, KS_LOAD, KS_MUL, KS_DONE} ks_state_e;

  localparam int unsigned NUM_INV = 18;   // Z1 and Z4 of each of the 9 phases

  ks_state_e            state_q;
  subkeys_t             sk_q;
  logic [4:0]           idx_q;            // which inverse, 0..17
  logic [3:0]           it_q;             // square/multiply round, 0..14
  logic                 sq_q;             // 1: squaring cycle, 0: multiply by x
  word_t                x_q, acc_q;
  word_t                mul_b, mul_p;
  logic [5:0]           pos;

  // Subkeys of the decryption schedule, with Z1 and Z4 still to be inverted.
  function automatic subkeys_t dec_order(subkeys_t ek);
    subkeys_t dk;
    dk = '0;
    for (int unsigned r = 0; r <= NUM_PHASES; r++) begin
      int unsigned s;
      s = NUM_PHASES - r;
      dk[6*r]   = ek[6*s];
      dk[6*r+3] = ek[6*s+3];
      if (r == 0 || r == NUM_PHASES) begin
        dk[6*r+1] = word_t'(0) - ek[6*s+1];
        dk[6*r+2] = word_t'(0) - ek[6*s+2];
      end else begin
        dk[6*r+1] = word_t'(0) - ek[6*s+2];
        dk[6*r+2] = word_t'(0) - ek[6*s+1];
      end
      if (r < NUM_PHASES) begin
        dk[6*r+4] = ek[6*(NUM_PHASES-1-r)+4];
        dk[6*r+5] = ek[6*(NUM_PHASES-1-r)+5];
      end
    end
    return dk;
  endfunction

  // Position of inverse idx: Z1 (idx even) or Z4 (idx odd) of phase idx/2.
  assign pos   = 6'(6 * idx_q[4:1]) + (idx_q[0] ? 6'd3 : 6'd0);
  assign mul_b = sq_q ? acc_q : x_q;

  idea_mul u_mul (.a(acc_q), .b(mul_b), .p(mul_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= KS_IDLE;
      sk_q    <= '0;
      idx_q   <= '0;
      it_q    <= '0;
      sq_q    <= 1'b1;
      x_q     <= '0;
      acc_q   <= '0;
    end else begin
      unique case (state_q)
        KS_IDLE: if (start) begin
          if (decrypt) begin
            sk_q    <= dec_order(expand_key(key));
            idx_q   <= '0;
            state_q <= KS_LOAD;
          end else begin
            sk_q    <= expand_key(key);
            state_q <= KS_DONE;
          end
        end
        KS_LOAD: begin
          x_q     <= sk_q[pos];
          acc_q   <= sk_q[pos];
          it_q    <= '0;
          sq_q    <= 1'b1;
          state_q <= KS_MUL;
        end
        KS_MUL: begin
          acc_q <= mul_p;
          sq_q  <= !sq_q;
          if (!sq_q) begin
            it_q <= it_q + 4'd1;
            if (it_q == 4'd14) begin
              sk_q[pos] <= mul_p;
              idx_q     <= idx_q + 5'd1;
              state_q   <= (idx_q == 5'(NUM_INV-1)) ? KS_DONE : KS_LOAD;
            end
          end
        end
        KS_DONE: state_q <= KS_IDLE;
        default: state_q <= KS_IDLE;
      endcase
    end
  end

  assign busy    = (state_q != KS_IDLE);
  assign done    = (state_q == KS_DONE);
  assign subkeys = sk_q;
endmodule
