// sbox_gf: combinational AES S-box built from composite-field arithmetic (GSBOX).
//
// Rather than storing 256 entries, the byte is mapped by the isomorphism delta
// from GF(2^8) onto GF((2^4)^2), written a_h*x + a_l, where the inverse is cheap:
//   (a_h x + a_l)^-1 = (a_h*d) x + (a_h ^ a_l)*d,
//   d = (a_h^2 * lambda  ^  a_h*a_l  ^  a_l^2)^-1,   lambda = {e},
// with n(x) = x^2 + x + {e} as the extension polynomial. The result is mapped
// back by delta^-1 and passed through the affine transform (XOR {63}).
// For the inverse S-box (decryption) the inverse affine transform is applied
// first and the forward affine transform is skipped, so one circuit serves both.
// The delta mapping, lambda and the merged square-times-lambda XOR network
// follow the described design; the ground field x^4 + x + 1, the a^14 inverter
// in GF(2^4) and the sharing of the inverter for decryption are this design's
// choices. delta^-1 is the matrix inverse of delta.
//
// Interface: din (byte), inv (1 = inverse S-box), dout (byte). Purely
// combinational, no clock.
module sbox_gf
  import aes_pkg::*;
(
  input  logic [7:0] din,
  input  logic       inv,
  output logic [7:0] dout
);

  logic [7:0] a;       // byte entering the field inversion
  logic [3:0] al, ah;  // composite-field halves
  logic [3:0] d, bh, bl;
  logic [7:0] c;       // inverse, in composite representation {bh, bl}
  logic [7:0] y;       // inverse, back in GF(2^8)
  logic       aA, aB, aC;

  always_comb begin
    a = inv ? inv_affine(din) : din;

    // delta: GF(2^8) -> GF((2^4)^2)
    aA = a[1] ^ a[7];
    aB = a[5] ^ a[7];
    aC = a[4] ^ a[6];
    al = {a[2] ^ a[4], aA, a[1] ^ a[2], aC ^ a[0] ^ a[5]};
    ah = {aB, aB ^ a[2] ^ a[3], aA ^ aC, aC ^ a[5]};

    // inversion in GF((2^4)^2)
    d  = ginv4(sq_lambda4(ah) ^ gmul4(ah, al) ^ gmul4(al, al));
    bh = gmul4(ah, d);
    bl = gmul4(ah ^ al, d);
    c  = {bh, bl};

    // delta^-1: GF((2^4)^2) -> GF(2^8)
    y[0] = c[0] ^ c[4];
    y[1] = c[4] ^ c[5] ^ c[7];
    y[2] = c[1] ^ c[4] ^ c[5] ^ c[7];
    y[3] = c[1] ^ c[4] ^ c[5] ^ c[6];
    y[4] = c[1] ^ c[3] ^ c[4] ^ c[5] ^ c[7];
    y[5] = c[2] ^ c[4] ^ c[5];
    y[6] = c[1] ^ c[2] ^ c[3] ^ c[4] ^ c[7];
    y[7] = c[2] ^ c[4] ^ c[5] ^ c[7];

    dout = inv ? y : affine(y);
  end

endmodule
