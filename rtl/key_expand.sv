// key_expand: pre-computes the round keys of AES-128/192/256 into the round-key memory.
//
// The round keys are computed once, before any block is processed, with the
// same kind of S-box (table or composite-field logic) as the datapath. The
// unit produces one 32-bit key word per clock and writes it to the memory:
// words 0..Nk-1 are the cipher key itself; each later word is
//   w[i] = w[i-Nk] ^ temp,  temp = w[i-1], transformed when
//     i mod Nk == 0          : SubWord(RotWord(temp)) ^ Rcon
//     Nk == 8, i mod Nk == 4 : SubWord(temp)
// A window of the last eight words supplies w[i-1] and w[i-Nk]; four S-boxes
// form SubWord; Rcon is a register advanced by xtime. 4*(Nr+1) words take as
// many clocks; done is high 4*(Nr+1) + 1 clocks after the clock in which
// start is (45, 53 or 61). The word-serial structure and the handshake
// are this design's choices.
//
// Interface: start (pulse, ignored while busy) with keylen and key (256 bits,
// word 0 in bits [255:224]; AES-128 uses the top 128 bits, AES-192 the top
// 192) sampled on it; busy while running; done pulses with the last write;
// we/waddr/wdata form the memory write port.
module key_expand
  import aes_pkg::*;
#(
  parameter sbox_kind_e SBOX_KIND = GSBOX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  keylen_e      keylen,
  input  logic [255:0] key,
  output logic         busy,
  output logic         done,
  output logic         we,
  output logic [5:0]   waddr,
  output logic [31:0]  wdata
);

  logic [255:0] key_q;
  logic [3:0]   nk_q;
  logic [5:0]   nwords_q;
  logic [5:0]   idx_q;     // index i of the word being produced
  logic [3:0]   mod_q;     // i mod Nk
  logic [7:0]   rcon_q;
  logic [31:0]  hist_q [8];   // hist_q[j] = w[i-1-j]

  logic [31:0]  temp, rot, sub, wnew;

  assign rot = (mod_q == 4'd0) ? {hist_q[0][23:0], hist_q[0][31:24]} : hist_q[0];

  for (genvar g = 0; g < 4; g++) begin : g_subword
    aes_sbox #(.KIND(SBOX_KIND)) u_sbox (
      .din (rot[31 - 8*g -: 8]),
      .inv (1'b0),
      .dout(sub[31 - 8*g -: 8])
    );
  end

  always_comb begin
    if (mod_q == 4'd0)                         temp = sub ^ {rcon_q, 24'h0};
    else if (nk_q == 4'd8 && mod_q == 4'd4)    temp = sub;
    else                                       temp = hist_q[0];
    if (idx_q < 6'(nk_q)) wnew = key_q[255 - 32*idx_q -: 32];
    else                  wnew = hist_q[3'(nk_q - 4'd1)] ^ temp;
  end

  assign we    = busy;
  assign waddr = idx_q;
  assign wdata = wnew;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      key_q    <= '0;
      nk_q     <= 4'd4;
      nwords_q <= 6'd44;
      idx_q    <= '0;
      mod_q    <= '0;
      rcon_q   <= 8'h01;
      for (int j = 0; j < 8; j++) hist_q[j] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          key_q    <= key;
          nk_q     <= nk_of(keylen);
          nwords_q <= 6'(4 * (int'(nr_of(keylen)) + 1));
          idx_q    <= '0;
          mod_q    <= '0;
          rcon_q   <= 8'h01;
        end
      end else begin
        for (int j = 7; j > 0; j--) hist_q[j] <= hist_q[j-1];
        hist_q[0] <= wnew;
        idx_q     <= idx_q + 6'd1;
        // i mod Nk counts only once the cipher-key words are loaded
        if (idx_q + 6'd1 >= 6'(nk_q)) begin
          if (mod_q == nk_q - 4'd1 || idx_q + 6'd1 == 6'(nk_q)) mod_q <= '0;
          else                                                   mod_q <= mod_q + 4'd1;
        end
        if (idx_q >= 6'(nk_q) && mod_q == 4'd0) rcon_q <= xtime(rcon_q);
        if (idx_q == nwords_q - 6'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
