// sbox_table: AES S-box as a pre-stored lookup table (TSBOX).
//
// Two 256 x 8 read-only tables, the forward S-box for encryption and the
// inverse S-box for decryption, indexed by the input byte; inv selects which
// one drives dout. The contents are computed at elaboration time in aes_pkg
// from the S-box definition (GF(2^8) inverse, then affine transform), so the
// ROM needs no data file. Keeping both tables follows the described table
// versions (S-box for encryption, inverse S-box for decryption); reading them
// combinationally, as a ROM inside the datapath, is this design's choice.
//
// Interface: din (byte), inv (1 = inverse table), dout (byte). Combinational.
module sbox_table
  import aes_pkg::*;
(
  input  logic [7:0] din,
  input  logic       inv,
  output logic [7:0] dout
);

  localparam sbox_table_t FWD = make_sbox();
  localparam sbox_table_t INV = make_inv_sbox();

  always_comb dout = inv ? INV[din] : FWD[din];

endmodule
