// md5_pkg: types and constants shared by the MD5 core.
//
// Holds the 128-bit state type (four 32-bit words A, B, C, D), the initial
// chaining value, the 64 additive constants T[i] = floor(2^32 * |sin(i+1)|),
// the per-round rotation amounts and the order in which each round reads the
// sixteen message words. These are the standard MD5 definitions (RFC 1321);
// the grouping by round, so that each round-specific block (RFx) only sees its
// own constants, is this design's arrangement.
package md5_pkg;

  typedef logic [31:0] word_t;

  // Working state of the compression function.
  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
  } md5_state_t;

  // Sixteen 32-bit words of one 512-bit block; index k is X[k], the
  // little-endian word made of bytes 4k..4k+3 of the block.
  typedef word_t [15:0] md5_block_t;

  // Nonlinear function of each round.
  typedef enum logic [1:0] {FN_F = 2'd0, FN_G = 2'd1, FN_H = 2'd2, FN_I = 2'd3} md5_fn_e;

  localparam int unsigned ROUNDS          = 4;   // F, G, H, I rounds
  localparam int unsigned STEPS_PER_ROUND = 16;
  localparam int unsigned STEPS_PER_CYCLE = 4;   // unrolled steps inside one RFx
  localparam int unsigned CYCLES_PER_BLOCK = ROUNDS * STEPS_PER_ROUND / STEPS_PER_CYCLE;  // 16

  localparam md5_state_t MD5_IV = '{a: 32'h67452301, b: 32'hefcdab89,
                                    c: 32'h98badcfe, d: 32'h10325476};

  // T[i], i = 0..63.
  localparam word_t MD5_T [64] = '{
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee,
    32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be,
    32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa,
    32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed,
    32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c,
    32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05,
    32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039,
    32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1,
    32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391
  };

  // Rotation amount of step j (0..3) of a group of four in round r. Within a
  // round the amounts repeat with period four, which is what lets each RFx
  // hard-wire its rotations.
  function automatic int unsigned md5_shift(int unsigned r, int unsigned j);
    case (r)
      0: case (j) 0: return 7;  1: return 12; 2: return 17; default: return 22; endcase
      1: case (j) 0: return 5;  1: return 9;  2: return 14; default: return 20; endcase
      2: case (j) 0: return 4;  1: return 11; 2: return 16; default: return 23; endcase
      default: case (j) 0: return 6; 1: return 10; 2: return 15; default: return 21; endcase
    endcase
  endfunction

  // Index k of the message word read by step n (0..15) of round r.
  function automatic int unsigned md5_word_index(int unsigned r, int unsigned n);
    case (r)
      0:       return n % 16;
      1:       return (1 + 5 * n) % 16;
      2:       return (5 + 3 * n) % 16;
      default: return (7 * n) % 16;
    endcase
  endfunction

  // Nonlinear function of the given round.
  function automatic word_t md5_f(md5_fn_e fn, word_t b, word_t c, word_t d);
    case (fn)
      FN_F:    return (b & c) | (~b & d);
      FN_G:    return (b & d) | (c & ~d);
      FN_H:    return b ^ c ^ d;
      default: return c ^ (b | ~d);
    endcase
  endfunction

endpackage
