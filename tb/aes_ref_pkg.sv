// aes_ref_pkg: software reference model of AES for the testbenches.
//
// Written independently of the RTL: the S-box is built from exponent and
// logarithm tables over the generator {03} (the RTL uses a^254 and a
// composite-field circuit), the cipher works on a byte array in the FIPS-197
// order (byte k of a block is in bits [127-8k -: 8]) and follows the
// textbook round order. Provides sub/inverse S-box, MixColumns of a column,
// ShiftRows, key expansion and whole-block encryption and decryption.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
      b = b >> 1;
    end
    return r;
  endfunction

  logic [7:0] sb_t  [256];
  logic [7:0] isb_t [256];
  bit         tables_ready = 1'b0;

  function automatic void build_tables();
    logic [7:0] expt [256];
    logic [7:0] logt [256];
    logic [7:0] p, inv, s;
    p = 1;
    logt[0] = 0;
    for (int i = 0; i < 255; i++) begin
      expt[i] = p;
      logt[p] = 8'(i);
      p = mul(p, 8'h03);
    end
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : expt[(255 - int'(logt[x])) % 255];
      s = inv;
      for (int k = 1; k <= 4; k++) s ^= (inv << k) | (inv >> (8 - k));
      sb_t[x] = s ^ 8'h63;
      isb_t[sb_t[x]] = 8'(x);
    end
    tables_ready = 1'b1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    if (!tables_ready) build_tables();
    return sb_t[x];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    if (!tables_ready) build_tables();
    return isb_t[y];
  endfunction

  function automatic logic [31:0] mixcol(logic [31:0] c, bit inv);
    logic [7:0] b [4];
    logic [7:0] m [4];
    logic [31:0] r;
    for (int i = 0; i < 4; i++) b[i] = c[31-8*i -: 8];
    if (!inv) begin
      m[0] = 8'h02; m[1] = 8'h03; m[2] = 8'h01; m[3] = 8'h01;
    end else begin
      m[0] = 8'h0e; m[1] = 8'h0b; m[2] = 8'h0d; m[3] = 8'h09;
    end
    for (int i = 0; i < 4; i++) begin
      logic [7:0] acc;
      acc = 0;
      for (int j = 0; j < 4; j++) acc ^= mul(m[(j - i + 4) % 4], b[j]);
      r[31-8*i -: 8] = acc;
    end
    return r;
  endfunction

  function automatic logic [127:0] shiftrows(logic [127:0] s, bit inv);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
        else      o[127 - 8*(4*((c + r) % 4) + r) -: 8] = s[127 - 8*(4*c + r) -: 8];
    return o;
  endfunction

  function automatic logic [127:0] subbytes(logic [127:0] s, bit inv);
    for (int k = 0; k < 16; k++)
      s[127-8*k -: 8] = inv ? inv_sbox(s[127-8*k -: 8]) : sbox(s[127-8*k -: 8]);
    return s;
  endfunction

  function automatic logic [127:0] mixcolumns(logic [127:0] s, bit inv);
    for (int c = 0; c < 4; c++) s[127-32*c -: 32] = mixcol(s[127-32*c -: 32], inv);
    return s;
  endfunction

  typedef logic [31:0] words_t [60];

  // nk = 4, 6 or 8; key word 0 in bits [255:224]
  function automatic words_t expand(logic [255:0] key, int nk);
    words_t w;
    logic [31:0] t;
    logic [7:0] rc;
    int nw;
    nw = 4 * (nk + 7);
    rc = 8'h01;
    for (int i = 0; i < 60; i++) w[i] = 0;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    for (int i = nk; i < nw; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        for (int k = 0; k < 4; k++) t[31-8*k -: 8] = sbox(t[31-8*k -: 8]);
        t ^= {rc, 24'h0};
        rc = mul(rc, 8'h02);
      end else if (nk == 8 && i % nk == 4) begin
        for (int k = 0; k < 4; k++) t[31-8*k -: 8] = sbox(t[31-8*k -: 8]);
      end
      w[i] = w[i-nk] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] rkey(words_t w, int r);
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key, int nk);
    words_t w;
    logic [127:0] s;
    int nr;
    nr = nk + 6;
    w = expand(key, nk);
    s = pt ^ rkey(w, 0);
    for (int r = 1; r <= nr; r++) begin
      s = subbytes(s, 0);
      s = shiftrows(s, 0);
      if (r != nr) s = mixcolumns(s, 0);
      s ^= rkey(w, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [255:0] key, int nk);
    words_t w;
    logic [127:0] s;
    int nr;
    nr = nk + 6;
    w = expand(key, nk);
    s = ct ^ rkey(w, nr);
    for (int r = nr - 1; r >= 0; r--) begin
      s = shiftrows(s, 1);
      s = subbytes(s, 1);
      s ^= rkey(w, r);
      if (r != 0) s = mixcolumns(s, 1);
    end
    return s;
  endfunction

endpackage
