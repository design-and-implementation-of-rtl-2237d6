// md5_ref_pkg: software reference model of MD5 for the testbenches.
//
// Written independently of the RTL: the constants are computed here from
// their definition T[i] = floor(2^32 * |sin(i + 1)|), the rotations and word
// order come from their own tables, and the steps are evaluated one at a time
// in the textbook order. Also provides RFC 1321 padding of a byte string into
// 512-bit blocks and a formatter for the digest as the usual hex string.
package md5_ref_pkg;

  typedef bit [31:0] rword_t;
  typedef rword_t    rblock_t [16];   // X[0..15]
  typedef rword_t    rstate_t [4];    // a, b, c, d

  localparam int RS [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};

  function automatic rword_t ref_t(int i);
    real v;
    v = $sin(real'(i + 1));
    if (v < 0.0) v = -v;
    return rword_t'(longint'($floor(v * 4294967296.0)));
  endfunction

  function automatic int ref_k(int i);
    case (i / 16)
      0: return i % 16;
      1: return (5 * i + 1) % 16;
      2: return (3 * i + 5) % 16;
      default: return (7 * i) % 16;
    endcase
  endfunction

  function automatic rword_t rotl(rword_t v, int s);
    return (v << s) | (v >> (32 - s));
  endfunction

  // State after step i applied to s (state order a, b, c, d).
  function automatic rstate_t ref_step(rstate_t s, int i, rblock_t x);
    rword_t f, tmp;
    rstate_t o;
    case (i / 16)
      0: f = (s[1] & s[2]) | (~s[1] & s[3]);
      1: f = (s[3] & s[1]) | (~s[3] & s[2]);
      2: f = s[1] ^ s[2] ^ s[3];
      default: f = s[2] ^ (s[1] | ~s[3]);
    endcase
    tmp = s[0] + f + ref_t(i) + x[ref_k(i)];
    o[0] = s[3];
    o[1] = s[1] + rotl(tmp, RS[(i / 16) * 4 + (i % 4)]);
    o[2] = s[1];
    o[3] = s[2];
    return o;
  endfunction

  function automatic rstate_t ref_iv();
    rstate_t s;
    s[0] = 32'h67452301; s[1] = 32'hefcdab89; s[2] = 32'h98badcfe; s[3] = 32'h10325476;
    return s;
  endfunction

  function automatic rstate_t ref_compress(rstate_t h, rblock_t x);
    rstate_t s = h;
    for (int i = 0; i < 64; i++) s = ref_step(s, i, x);
    for (int w = 0; w < 4; w++) s[w] = s[w] + h[w];
    return s;
  endfunction

  // RFC 1321 padding: 0x80, zeros, 64-bit little-endian bit length.
  function automatic void ref_pad(input byte unsigned msg [$], output rblock_t blocks [$]);
    byte unsigned m [$];
    longint unsigned bits;
    rblock_t b;
    m = msg;
    bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 0; i < 8; i++) m.push_back(8'(bits >> (8 * i)));
    blocks = {};
    for (int n = 0; n < m.size() / 64; n++) begin
      for (int k = 0; k < 16; k++)
        b[k] = {m[64*n+4*k+3], m[64*n+4*k+2], m[64*n+4*k+1], m[64*n+4*k]};
      blocks.push_back(b);
    end
  endfunction

  function automatic void str_bytes(input string s, output byte unsigned q [$]);
    q = {};
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

  // Digest as the usual 32-character hex string (bytes of a, b, c, d,
  // each word little-endian).
  function automatic string ref_hex(rstate_t h);
    string r = "";
    for (int w = 0; w < 4; w++)
      for (int i = 0; i < 4; i++) r = {r, $sformatf("%02x", 8'(h[w] >> (8 * i)))};
    return r;
  endfunction

endpackage
