// mix_columns: MixColumns / InvMixColumns of one 4-byte state column.
//
// The column (b0, b1, b2, b3) is a polynomial over GF(2^8) multiplied modulo
// x^4 + 1 by {03}x^3 + {01}x^2 + {01}x + {02}:
//   c0 = 2b0 ^ 3b1 ^  b2 ^  b3      c1 =  b0 ^ 2b1 ^ 3b2 ^  b3
//   c2 =  b0 ^  b1 ^ 2b2 ^ 3b3      c3 = 3b0 ^  b1 ^  b2 ^ 2b3
// Multiplication by {02} is a left shift with a conditional XOR of {1b}
// (xtime); larger constants are sums of repeated xtimes, so the unit is XOR
// gates only. With inv = 1 it computes InvMixColumns, whose matrix rows use
// {0e},{0b},{0d},{09}, built from the same xtime chain (x2, x4, x8) - the
// inverse mode is this design's addition for decryption.
//
// Interface: col_in / col_out are 32-bit columns with b0 in bits [31:24];
// inv selects the inverse transform. Combinational.
module mix_columns
  import aes_pkg::*;
(
  input  logic [31:0] col_in,
  input  logic        inv,
  output logic [31:0] col_out
);

  logic [7:0] b  [4];
  logic [7:0] x2 [4];
  logic [7:0] x4 [4];
  logic [7:0] x8 [4];
  logic [7:0] c  [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      b[i]  = col_in[31 - 8*i -: 8];
      x2[i] = xtime(b[i]);
      x4[i] = xtime(x2[i]);
      x8[i] = xtime(x4[i]);
    end
    for (int i = 0; i < 4; i++) begin
      if (!inv) begin
        // 2*b[i] ^ 3*b[i+1] ^ b[i+2] ^ b[i+3]
        c[i] = x2[i] ^ x2[(i+1)%4] ^ b[(i+1)%4] ^ b[(i+2)%4] ^ b[(i+3)%4];
      end else begin
        // 0e*b[i] ^ 0b*b[i+1] ^ 0d*b[i+2] ^ 09*b[i+3]
        c[i] = (x8[i] ^ x4[i] ^ x2[i])
             ^ (x8[(i+1)%4] ^ x2[(i+1)%4] ^ b[(i+1)%4])
             ^ (x8[(i+2)%4] ^ x4[(i+2)%4] ^ b[(i+2)%4])
             ^ (x8[(i+3)%4] ^ b[(i+3)%4]);
      end
    end
    for (int i = 0; i < 4; i++) col_out[31 - 8*i -: 8] = c[i];
  end

endmodule
