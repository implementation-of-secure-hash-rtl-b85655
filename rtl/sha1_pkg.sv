// sha1_pkg: constants and step functions shared by the SHA-1 blocks.
// Holds the initial hash value H0..H4, the round constant K(t), the
// round function F(t,B,C,D) and the RAM memory map of the SHA-1 system.
// The constants are those of FIPS 180-1. The memory map (block 0 at 0x00,
// block 1 at 0x10, digest at 0x20..0x24) is this design's choice.
package sha1_pkg;

  typedef logic [31:0] word_t;

  localparam word_t IV [5] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe,
                               32'h10325476, 32'hc3d2e1f0};

  localparam logic [7:0] BLOCK0_BASE = 8'h00;
  localparam logic [7:0] BLOCK1_BASE = 8'h10;
  localparam logic [7:0] DIGEST_BASE = 8'h20;

  function automatic word_t k_const(input logic [6:0] t);
    if (t < 7'd20)      return 32'h5a827999;
    else if (t < 7'd40) return 32'h6ed9eba1;
    else if (t < 7'd60) return 32'h8f1bbcdc;
    else                return 32'hca62c1d6;
  endfunction

  function automatic word_t f_func(input logic [6:0] t, input word_t x,
                                   input word_t y, input word_t z);
    if (t < 7'd20)      return (x & y) ^ (~x & z);
    else if (t < 7'd40) return x ^ y ^ z;
    else if (t < 7'd60) return (x & y) ^ (x & z) ^ (y & z);
    else                return x ^ y ^ z;
  endfunction

  function automatic word_t rotl(input word_t x, input int unsigned s);
    return (x << s) | (x >> (32 - s));
  endfunction

endpackage
