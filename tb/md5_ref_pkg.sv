// Reference model of the MD5 block compression for the testbenches.
//
// Written step by step over all 64 steps, with the constants computed from
// their definition K[i] = floor(|sin(i+1)| * 2^32) rather than taken from the
// design's table, so it checks the design independently.
package md5_ref_pkg;

  function automatic logic [31:0] ref_k(input int i);
    real v;
    v = $sin(real'(i + 1));
    if (v < 0.0) v = -v;
    return 32'(longint'($floor(v * 4294967296.0)));
  endfunction

  function automatic int ref_shift(input int i);
    int t [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};
    return t[(i / 16) * 4 + (i % 4)];
  endfunction

  // Full block: 64 steps plus the final addition. State {D,C,B,A}.
  function automatic logic [127:0] ref_compress(input logic [127:0] h, input logic [511:0] m);
    logic [31:0] a, b, c, d, f, tmp;
    int g;
    a = h[31:0]; b = h[63:32]; c = h[95:64]; d = h[127:96];
    for (int i = 0; i < 64; i++) begin
      if (i < 16)      begin f = (b & c) | ((~b) & d); g = i;                end
      else if (i < 32) begin f = (d & b) | ((~d) & c); g = (5 * i + 1) % 16; end
      else if (i < 48) begin f = b ^ c ^ d;            g = (3 * i + 5) % 16; end
      else             begin f = c ^ (b | (~d));       g = (7 * i) % 16;     end
      tmp = a + f + ref_k(i) + m[32*g +: 32];
      a = d; d = c; c = b;
      b = b + ((tmp << ref_shift(i)) | (tmp >> (32 - ref_shift(i))));
    end
    return {h[127:96] + d, h[95:64] + c, h[63:32] + b, h[31:0] + a};
  endfunction

  function automatic logic [127:0] ref_iv();
    return {32'h10325476, 32'h98badcfe, 32'hefcdab89, 32'h67452301};
  endfunction

  // Padded single block for a message of up to 55 bytes given as a string.
  function automatic logic [511:0] ref_pad(input string s);
    logic [511:0] m;
    m = '0;
    for (int k = 0; k < s.len(); k++) m[8*k +: 8] = s[k];
    m[8*s.len() +: 8] = 8'h80;
    m[448 +: 64] = 64'(s.len() * 8);
    return m;
  endfunction

  // Digest bytes as printed (hex string order) -> {D,C,B,A} words.
  function automatic logic [127:0] ref_from_hex(input logic [127:0] printed);
    logic [127:0] r;
    for (int k = 0; k < 16; k++) r[8*k +: 8] = printed[127 - 8*k -: 8];
    return r;
  endfunction

endpackage
