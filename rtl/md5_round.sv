// One MD5 round: 16 steps unrolled into a single combinational stage.
//
// round (0..3) selects the round's boolean function, message word order,
// step constants and rotation amounts, so the same stage serves all four
// rounds; the state passes through it four times to hash one block.
// Step j of round r (i = 16r + j):
//   F = (B&C)|(~B&D), g = i            (r = 0)
//       (D&B)|(~D&C), g = (5i+1) mod 16 (r = 1)
//       B^C^D,        g = (3i+5) mod 16 (r = 2)
//       C^(B|~D),     g = 7i mod 16     (r = 3)
//   A,B,C,D <= D, B + rotl(A + F + K[i] + M[g], R[r][j mod 4]), B, C
// Unrolling the 16 steps into one cycle follows the document; the round
// number as a run-time input is how the engine reuses the stage for the
// per-round configuration it describes.
module md5_round
  import md5_pkg::*;
(
  input  logic [1:0]   round,
  input  logic [511:0] msg,
  input  logic [127:0] st_in,    // {D,C,B,A}
  output logic [127:0] st_out
);

  function automatic logic [31:0] rotl(input logic [31:0] x, input logic [4:0] s);
    return (x << s) | (x >> (6'd32 - {1'b0, s}));
  endfunction

  always_comb begin
    logic [31:0] a, b, c, d, f, t;
    logic [3:0]  g;
    logic [5:0]  i;
    a = st_in[31:0];
    b = st_in[63:32];
    c = st_in[95:64];
    d = st_in[127:96];
    for (int j = 0; j < 16; j++) begin
      i = {round, 4'(j)};
      unique case (round)
        2'd0: begin f = (b & c) | (~b & d); g = i[3:0];                 end
        2'd1: begin f = (d & b) | (~d & c); g = 4'(5 * i + 1);          end
        2'd2: begin f = b ^ c ^ d;          g = 4'(3 * i + 5);          end
        default: begin f = c ^ (b | ~d);    g = 4'(7 * i);              end
      endcase
      t = a + f + MD5_K[i] + msg[32*g +: 32];
      a = d;
      d = c;
      c = b;
      b = b + rotl(t, MD5_R[round][j % 4]);
    end
    st_out = {d, c, b, a};
  end

endmodule
