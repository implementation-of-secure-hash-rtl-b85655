// groestl_ref_pkg: whole-state Groestl-256 model for the testbenches.
// The state is an 8x8 byte array a[row][col]; a round applies
// AddRoundConstant, SubBytes, ShiftBytes and MixBytes to the whole matrix
// at once. The S-box is computed here from its definition (inverse in
// GF(2^8) followed by the affine map) rather than read from a table.
// Also pads byte strings into 512-bit blocks (block count in the last
// 64 bits).
package groestl_ref_pkg;

  typedef logic [7:0] b8_t;
  typedef b8_t mat_t [8][8];

  function automatic b8_t gm(input b8_t a, input b8_t b);
    b8_t r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic b8_t sb(input b8_t x);
    b8_t inv = 0, s;
    if (x != 0)
      for (int c = 1; c < 256; c++) if (gm(x, 8'(c)) == 8'h01) inv = 8'(c);
    s = inv;
    for (int i = 1; i < 5; i++) s ^= (inv << i) | (inv >> (8 - i));
    return s ^ 8'h63;
  endfunction

  function automatic mat_t from_vec(input logic [511:0] v);
    mat_t a;
    for (int k = 0; k < 64; k++) a[k % 8][k / 8] = v[511 - 8*k -: 8];
    return a;
  endfunction

  function automatic logic [511:0] to_vec(input mat_t a);
    logic [511:0] v;
    for (int k = 0; k < 64; k++) v[511 - 8*k -: 8] = a[k % 8][k / 8];
    return v;
  endfunction

  function automatic mat_t round_fn(input mat_t a, input int r, input bit q);
    mat_t t, u;
    int bco [8] = '{2, 2, 3, 4, 5, 3, 5, 7};
    if (q) a[7][0] ^= 8'(r) ^ 8'hff;
    else   a[0][0] ^= 8'(r);
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) t[i][j] = sb(a[i][(j + i) % 8]);
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++) begin
        u[i][j] = 0;
        for (int k = 0; k < 8; k++) u[i][j] ^= gm(8'(bco[(k - i + 8) % 8]), t[k][j]);
      end
    return u;
  endfunction

  function automatic logic [511:0] perm(input logic [511:0] v, input bit q, input int rounds);
    mat_t a = from_vec(v);
    for (int r = 0; r < rounds; r++) a = round_fn(a, r, q);
    return to_vec(a);
  endfunction

  function automatic logic [511:0] compress(input logic [511:0] h, input logic [511:0] m,
                                            input int rounds);
    return perm(h ^ m, 0, rounds) ^ perm(m, 1, rounds) ^ h;
  endfunction

  function automatic logic [255:0] out_tf(input logic [511:0] h, input int rounds);
    logic [511:0] x = perm(h, 0, rounds) ^ h;
    return x[255:0];
  endfunction

  // Pads len bytes of msg (byte 0 first) into nblk 512-bit blocks.
  function automatic int nblocks(input int len);
    return (len * 8 + 65 + 511) / 512;
  endfunction

  function automatic logic [511:0] pad_block(input logic [7:0] msg [256], input int len,
                                             input int idx);
    int n = nblocks(len);
    logic [511:0] v = '0;
    for (int k = 0; k < 64; k++) begin
      int p = idx * 64 + k;
      b8_t by = 0;
      if (p < len) by = msg[p];
      else if (p == len) by = 8'h80;
      if (idx == n - 1 && k >= 56) by = 8'(64'(n) >> (8 * (63 - k)));
      v[511 - 8*k -: 8] = by;
    end
    return v;
  endfunction

endpackage
