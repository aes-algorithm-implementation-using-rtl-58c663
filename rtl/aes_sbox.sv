// aes_sbox: one S-box of the kind chosen by parameter KIND.
//
// KIND = TSBOX instantiates the table S-box (sbox_table), KIND = GSBOX the
// composite-field logic S-box (sbox_gf). The choice between the two is one of
// the design-space parameters of the coprocessor; every S-box in the design,
// those of the key schedule included, is of the same kind.
//
// Interface: din, inv (1 = inverse S-box), dout. Combinational.
module aes_sbox
  import aes_pkg::*;
#(
  parameter sbox_kind_e KIND = GSBOX
) (
  input  logic [7:0] din,
  input  logic       inv,
  output logic [7:0] dout
);

  if (KIND == TSBOX) begin : g_table
    sbox_table u_sbox (.din(din), .inv(inv), .dout(dout));
  end else begin : g_logic
    sbox_gf u_sbox (.din(din), .inv(inv), .dout(dout));
  end

endmodule
