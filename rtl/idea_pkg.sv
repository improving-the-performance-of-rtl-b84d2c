// idea_pkg: sizes, types and helper functions shared by the IDEA FPGA design.
//
// IDEA enciphers 64-bit blocks, split into four 16-bit words, with 52 16-bit
// subkeys derived from a 128-bit key: six per phase for eight identical
// phases and four for the final transformation phase. These numbers are the
// algorithm's own. Word 1 of a block is its most significant 16 bits.
// Subkey n (0-based) is Z_{(n mod 6)+1} of phase (n / 6)+1 and sits in
// element n of the packed subkeys_t array.
package idea_pkg;

  localparam int unsigned WORD_W         = 16;
  localparam int unsigned BLOCK_W        = 64;
  localparam int unsigned KEY_W          = 128;
  localparam int unsigned NUM_PHASES     = 8;
  localparam int unsigned KEYS_PER_PHASE = 6;
  localparam int unsigned NUM_SUBKEYS    = NUM_PHASES * KEYS_PER_PHASE + 4;  // 52
  // Clock cycles one pipeline stage spends on a block (one step per cycle).
  localparam int unsigned PHASE_STEPS    = 8;

  typedef logic [WORD_W-1:0]                    word_t;
  typedef logic [BLOCK_W-1:0]                   block_t;
  typedef logic [KEY_W-1:0]                     key_t;
  typedef logic [NUM_SUBKEYS-1:0][WORD_W-1:0]   subkeys_t;
  typedef logic [KEYS_PER_PHASE-1:0][WORD_W-1:0] phase_keys_t;
  typedef logic [3:0][WORD_W-1:0]               final_keys_t;
  typedef logic [$clog2(PHASE_STEPS)-1:0]       step_t;

  // Word i (1..4) of a block, word 1 being the most significant.
  function automatic word_t blk_word(block_t b, int unsigned i);
    return b[BLOCK_W - WORD_W*i +: WORD_W];
  endfunction

  // Encryption key schedule: the key is cut into eight 16-bit subkeys, most
  // significant first, then rotated left by 25 bits for the next eight.
  function automatic subkeys_t expand_key(key_t key);
    subkeys_t z;
    key_t     k;
    k = key;
    for (int unsigned n = 0; n < NUM_SUBKEYS; n++) begin
      z[n] = k[KEY_W - WORD_W*(n % 8) - 1 -: WORD_W];
      if (n % 8 == 7) k = {k[KEY_W-26:0], k[KEY_W-1:KEY_W-25]};
    end
    return z;
  endfunction

endpackage
