// sha1_ref_pkg: straightforward SHA-1 model for the testbenches, written
// from FIPS 180-1 with an 80-word schedule array (not the shift register
// of the RTL). Also pads short byte strings into 512-bit blocks.
package sha1_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t blk_t [16];
  typedef w32_t dig_t [5];

  function automatic w32_t rl(input w32_t x, input int s);
    return (x << s) | (x >> (32 - s));
  endfunction

  function automatic dig_t iv();
    dig_t d;
    d[0] = 32'h67452301; d[1] = 32'hefcdab89; d[2] = 32'h98badcfe;
    d[3] = 32'h10325476; d[4] = 32'hc3d2e1f0;
    return d;
  endfunction

  function automatic dig_t compress(input dig_t hin, input blk_t m);
    w32_t w [80];
    w32_t a, b, c, d, e, f, k, tmp;
    dig_t ho;
    for (int t = 0; t < 80; t++)
      w[t] = (t < 16) ? m[t] : rl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
    a = hin[0]; b = hin[1]; c = hin[2]; d = hin[3]; e = hin[4];
    for (int t = 0; t < 80; t++) begin
      case (t / 20)
        0: begin f = (b & c) | (~b & d);            k = 32'h5a827999; end
        1: begin f = b ^ c ^ d;                     k = 32'h6ed9eba1; end
        2: begin f = (b & c) | (b & d) | (c & d);   k = 32'h8f1bbcdc; end
        default: begin f = b ^ c ^ d;               k = 32'hca62c1d6; end
      endcase
      tmp = rl(a, 5) + f + e + k + w[t];
      e = d; d = c; c = rl(b, 30); b = a; a = tmp;
    end
    ho[0] = hin[0] + a; ho[1] = hin[1] + b; ho[2] = hin[2] + c;
    ho[3] = hin[3] + d; ho[4] = hin[4] + e;
    return ho;
  endfunction

  // Pads a message of len bytes (len <= 55) given as msg[0..len-1] into one block.
  function automatic blk_t pad1(input logic [7:0] msg [64], input int len);
    logic [7:0] by [64];
    blk_t b;
    for (int i = 0; i < 64; i++) by[i] = (i < len) ? msg[i] : 8'h00;
    by[len] = 8'h80;
    by[62] = 8'((len * 8) >> 8);
    by[63] = 8'(len * 8);
    for (int i = 0; i < 16; i++) b[i] = {by[4*i], by[4*i+1], by[4*i+2], by[4*i+3]};
    return b;
  endfunction

endpackage
