// aes_pkg: types, constants and GF arithmetic shared by the AES coprocessor.
//
// GF(2^8) here is the AES field, reduced by m(x) = x^8 + x^4 + x^3 + x + 1
// ({11b}). GF(2^4) is the ground field of the composite-field S-box, reduced
// by x^4 + x + 1 ({13}); that choice of ground field is this design's own and
// is the one under which the byte-to-composite mapping used by sbox_gf is an
// isomorphism. The forward and inverse S-box tables used by sbox_table are
// computed here at elaboration time from their definition (multiplicative
// inverse in GF(2^8) followed by the affine transform, XOR {63}), so no data
// file is needed.
package aes_pkg;

  // Key length selector: AES-128, AES-192, AES-256.
  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } keylen_e;

  // S-box implementation: pre-stored table (TSBOX) or composite-field logic (GSBOX).
  typedef enum logic {
    TSBOX = 1'b0,
    GSBOX = 1'b1
  } sbox_kind_e;

  // Custom-instruction opcodes (the extension field "n" of the instruction).
  typedef enum logic [3:0] {
    CI_SET_KEYLEN = 4'd0,   // dataa[1:0] = keylen_e
    CI_WR_KEY     = 4'd1,   // dataa[2:0] = key word index, datab = word
    CI_KEY_EXPAND = 4'd2,   // multi-cycle: pre-compute all round keys
    CI_WR_STATE   = 4'd3,   // dataa[1:0] = state word index, datab = word
    CI_RD_STATE   = 4'd4,   // dataa[1:0] = state word index, result = word
    CI_ENCRYPT    = 4'd5,   // multi-cycle: encrypt the state block
    CI_DECRYPT    = 4'd6,   // multi-cycle: decrypt the state block
    CI_SUBBYTES   = 4'd7,   // multi-cycle: (Inv)SubBytes on the state, dataa[0] = inverse
    CI_SR_ARK     = 4'd8,   // (Inv)ShiftRows then AddRoundKey, dataa[0] = inverse, datab[3:0] = round
    CI_MIXCOL     = 4'd9,   // (Inv)MixColumns on the state, dataa[0] = inverse
    CI_ARK        = 4'd10,  // AddRoundKey only, datab[3:0] = round
    CI_SHIFTROWS  = 4'd11   // (Inv)ShiftRows only, dataa[0] = inverse
  } ci_op_e;

  // Operations of the round datapath (aes_core).
  typedef enum logic [2:0] {
    OP_ENC    = 3'd0,   // whole block encryption
    OP_DEC    = 3'd1,   // whole block decryption
    OP_SUB    = 3'd2,   // (Inv)SubBytes on the state
    OP_SR_ARK = 3'd3,   // (Inv)ShiftRows then AddRoundKey
    OP_MIX    = 3'd4,   // (Inv)MixColumns
    OP_ARK    = 3'd5,   // AddRoundKey
    OP_SR     = 3'd6    // (Inv)ShiftRows alone
  } core_op_e;

  // Result returned by an instruction whose hardware unit is not built.
  localparam logic [31:0] CI_UNSUPPORTED = 32'hFFFF_FFFF;

  localparam int unsigned MAX_NR    = 14;               // rounds of AES-256
  localparam int unsigned MAX_WORDS = 4 * (MAX_NR + 1); // 60 round-key words

  function automatic logic [3:0] nr_of(keylen_e kl);
    case (kl)
      KEY192:  return 4'd12;
      KEY256:  return 4'd14;
      default: return 4'd10;
    endcase
  endfunction

  function automatic logic [3:0] nk_of(keylen_e kl);
    case (kl)
      KEY192:  return 4'd6;
      KEY256:  return 4'd8;
      default: return 4'd4;
    endcase
  endfunction

  // ---------------- GF(2^8) ----------------
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul8(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    logic [7:0] p;
    r = 8'h00;
    p = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ p;
      p = xtime(p);
    end
    return r;
  endfunction

  // Forward affine transform of the S-box.
  function automatic logic [7:0] affine(logic [7:0] b);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  // Inverse affine transform (applied before inversion in InvSubBytes).
  function automatic logic [7:0] inv_affine(logic [7:0] s);
    logic [7:0] b;
    for (int i = 0; i < 8; i++)
      b[i] = s[(i + 2) % 8] ^ s[(i + 5) % 8] ^ s[(i + 7) % 8];
    return b ^ 8'h05;
  endfunction

  // Multiplicative inverse in GF(2^8) as a^254 (0 maps to 0).
  function automatic logic [7:0] ginv8(logic [7:0] a);
    logic [7:0] r;
    logic [7:0] p;
    r = 8'h01;
    p = a;
    for (int i = 0; i < 8; i++) begin   // 254 = 0b11111110
      if (i != 0) r = gmul8(r, p);
      p = gmul8(p, p);
    end
    return r;
  endfunction

  typedef logic [7:0] sbox_table_t [256];

  function automatic sbox_table_t make_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = affine(ginv8(8'(i)));
    return t;
  endfunction

  function automatic sbox_table_t make_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = ginv8(inv_affine(8'(i)));
    return t;
  endfunction

  // ---------------- GF(2^4), x^4 + x + 1 ----------------
  function automatic logic [3:0] gmul4(logic [3:0] a, logic [3:0] b);
    logic [3:0] r;
    logic [3:0] p;
    r = 4'h0;
    p = a;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r = r ^ p;
      p = {p[2:0], 1'b0} ^ (p[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction

  // Squaring followed by multiplication by lambda = {e}, merged into XORs.
  function automatic logic [3:0] sq_lambda4(logic [3:0] a);
    logic ab;
    ab = a[0] ^ a[1];
    return {ab, ab ^ a[3], a[0], a[1] ^ a[2]};
  endfunction

  // Inverse in GF(2^4) as a^14 = a^8 * a^4 * a^2 (0 maps to 0).
  function automatic logic [3:0] ginv4(logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gmul4(a, a);
    a4 = gmul4(a2, a2);
    a8 = gmul4(a4, a4);
    return gmul4(gmul4(a8, a4), a2);
  endfunction

endpackage
