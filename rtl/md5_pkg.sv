// md5_pkg: constants, types and step functions shared by the MD5 engine.
//
// The additive constants T[i] = floor(|sin(i+1)| * 2^32), the per-step rotate
// amounts and the message-word schedule are those of the MD5 standard
// (RFC 1321). The 512-bit block is held as 64 bytes, byte 0 being the first
// byte of the message, so 32-bit word j is simply bits [32j+31:32j] (MD5 reads
// its words little-endian). The chaining value packs A in bits [31:0], B in
// [63:32], C in [95:64] and D in [127:96].
//
// The constants are those of standard MD5; the byte and word packing and the
// padding-type encoding are this implementation's choices.
package md5_pkg;

  typedef logic [63:0][7:0] md5_block_t;   // one 512-bit block, byte 0 first
  typedef logic [127:0]     md5_cv_t;      // {D, C, B, A}

  // Padding applied by the input buffer to the bytes from count64 upwards.
  typedef enum logic [1:0] {
    PAD_NONE    = 2'd0,  // no padding: store one message byte at count64
    PAD_ONE_LEN = 2'd1,  // 0x80, zeros, 64-bit length in bytes 56..63
    PAD_ONE     = 2'd2,  // 0x80, zeros to the end of the block
    PAD_LEN     = 2'd3   // zeros, 64-bit length in bytes 56..63
  } md5_pad_t;

  // Initial chaining value ("special value" of the chaining register).
  localparam md5_cv_t MD5_IV = {32'h10325476, 32'h98badcfe, 32'hefcdab89, 32'h67452301};

  localparam logic [31:0] MD5_T [64] = '{
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

  // Rotate amount of step i: four per round, repeated four times.
  function automatic int unsigned md5_rot(input int unsigned i);
    case (i / 16)
      0: return (i % 4 == 0) ? 7 : (i % 4 == 1) ? 12 : (i % 4 == 2) ? 17 : 22;
      1: return (i % 4 == 0) ? 5 : (i % 4 == 1) ?  9 : (i % 4 == 2) ? 14 : 20;
      2: return (i % 4 == 0) ? 4 : (i % 4 == 1) ? 11 : (i % 4 == 2) ? 16 : 23;
      default: return (i % 4 == 0) ? 6 : (i % 4 == 1) ? 10 : (i % 4 == 2) ? 15 : 21;
    endcase
  endfunction

  // Message word used by step i.
  function automatic int unsigned md5_widx(input int unsigned i);
    case (i / 16)
      0: return i % 16;
      1: return (5 * i + 1) % 16;
      2: return (3 * i + 5) % 16;
      default: return (7 * i) % 16;
    endcase
  endfunction

  // Round function F, G, H or I of step i.
  function automatic logic [31:0] md5_fun(input int unsigned i,
                                          input logic [31:0] b, c, d);
    case (i / 16)
      0: return (b & c) | (~b & d);
      1: return (b & d) | (c & ~d);
      2: return b ^ c ^ d;
      default: return c ^ (b | ~d);
    endcase
  endfunction

endpackage
