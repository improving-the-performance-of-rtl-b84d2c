// idea_ref_pkg: behavioural reference model of IDEA for the testbenches.
//
// Written straight from the arithmetic definition, independent of the RTL:
// multiplication modulo 65537 uses a full 64-bit product and the % operator
// (0 standing for 65536), inverses are found with the extended Euclidean
// algorithm, and the key schedule rotates a 128-bit value by 25 bits.
package idea_ref_pkg;

  typedef logic [15:0]       w16_t;
  typedef logic [63:0]       b64_t;
  typedef logic [51:0][15:0] keys_t;

  function automatic w16_t ref_mul(w16_t a, w16_t b);
    longint unsigned x, y, r;
    x = (a == 0) ? 65536 : longint'(a);
    y = (b == 0) ? 65536 : longint'(b);
    r = (x * y) % 65537;
    return (r == 65536) ? 16'h0 : w16_t'(r);
  endfunction

  function automatic w16_t ref_inv(w16_t a);
    longint t, newt, r, newr, q, tmp;
    if (a == 0 || a == 1) return a;   // 65536 = -1 and 1 are their own inverses
    t = 0; newt = 1; r = 65537; newr = longint'(a);
    while (newr != 0) begin
      q = r / newr;
      tmp = t - q * newt; t = newt; newt = tmp;
      tmp = r - q * newr; r = newr; newr = tmp;
    end
    if (t < 0) t = t + 65537;
    return w16_t'(t);
  endfunction

  function automatic keys_t ref_enc_keys(logic [127:0] key);
    keys_t z;
    logic [127:0] k;
    k = key;
    for (int n = 0; n < 52; n++) begin
      z[n] = k[127 - 16*(n%8) -: 16];
      if (n % 8 == 7) k = (k << 25) | (k >> 103);
    end
    return z;
  endfunction

  function automatic keys_t ref_dec_keys(keys_t e);
    keys_t d;
    d = '0;
    for (int r = 0; r < 9; r++) begin
      int s;
      s = 8 - r;
      d[6*r]   = ref_inv(e[6*s]);
      d[6*r+3] = ref_inv(e[6*s+3]);
      d[6*r+1] = -e[6*s + ((r == 0 || r == 8) ? 1 : 2)];
      d[6*r+2] = -e[6*s + ((r == 0 || r == 8) ? 2 : 1)];
      if (r < 8) begin
        d[6*r+4] = e[6*(7-r)+4];
        d[6*r+5] = e[6*(7-r)+5];
      end
    end
    return d;
  endfunction

  // One of the eight phases, keys z[0..5] = Z1..Z6.
  function automatic b64_t ref_phase(b64_t x, logic [5:0][15:0] z);
    w16_t x1, x2, x3, x4, a, b, c, d, e, f, g;
    {x1, x2, x3, x4} = x;
    a = ref_mul(x1, z[0]);
    b = x2 + z[1];
    c = x3 + z[2];
    d = ref_mul(x4, z[3]);
    e = ref_mul(a ^ c, z[4]);
    f = ref_mul((b ^ d) + e, z[5]);
    g = e + f;
    return {a ^ f, c ^ f, b ^ g, d ^ g};
  endfunction

  function automatic b64_t ref_final(b64_t x, logic [3:0][15:0] z);
    w16_t x1, x2, x3, x4;
    {x1, x2, x3, x4} = x;
    return {ref_mul(x1, z[0]), w16_t'(x3 + z[1]), w16_t'(x2 + z[2]), ref_mul(x4, z[3])};
  endfunction

  function automatic b64_t ref_cipher(b64_t x, keys_t z);
    b64_t y;
    y = x;
    for (int r = 0; r < 8; r++) y = ref_phase(y, z[6*r +: 6]);
    return ref_final(y, z[48 +: 4]);
  endfunction

endpackage
