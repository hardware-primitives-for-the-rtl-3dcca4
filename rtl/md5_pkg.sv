// Constants and types of the MD5 example.
//
// MD5 processes a 512-bit block in 4 rounds of 16 steps. Step i (0..63) adds
// the constant K[i] = floor(|sin(i+1)| * 2^32) and rotates left by an amount
// that depends on the round and on i mod 4. The 64 constants are written out
// below (they follow from the formula; 64 words is small enough to list).
// md5_tok_t is the item that travels on the multithreaded elastic channels of
// the engine: the message block, the chaining value the block started from
// (needed for the final addition) and the running A,B,C,D state.
// Words are little-endian as in RFC 1321: A is bits [31:0] of a 128-bit state,
// message word g is bits [32*g+31:32*g] of the block.
package md5_pkg;

  localparam logic [31:0] MD5_K [64] = '{
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

  // Rotation amounts, indexed [round][step mod 4].
  localparam logic [4:0] MD5_R [4][4] = '{
    '{5'd7, 5'd12, 5'd17, 5'd22},
    '{5'd5, 5'd9,  5'd14, 5'd20},
    '{5'd4, 5'd11, 5'd16, 5'd23},
    '{5'd6, 5'd10, 5'd15, 5'd21}
  };

  typedef struct packed {
    logic [511:0] msg;   // message block, word g at [32*g +: 32]
    logic [127:0] ihv;   // chaining value at the start of the block
    logic [127:0] st;    // running state {D,C,B,A}
  } md5_tok_t;

  localparam int unsigned MD5_TOK_W = $bits(md5_tok_t);

  // Word-wise modulo-2^32 sum of two 128-bit states (final MD5 addition).
  function automatic logic [127:0] md5_add(input logic [127:0] x, input logic [127:0] y);
    logic [127:0] r;
    for (int w = 0; w < 4; w++) r[32*w +: 32] = x[32*w +: 32] + y[32*w +: 32];
    return r;
  endfunction

endpackage
