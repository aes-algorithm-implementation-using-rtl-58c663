// roundkey_ram: memory holding every pre-computed round key.
//
// All round keys are computed once per cipher key and stored, rather than
// generated on the fly; for AES-256 that is 15 round keys of 128 bits,
// 60 words of 32 bits. The key schedule writes one 32-bit word per clock;
// the datapath reads a whole 128-bit round key, words 4r .. 4r+3, by round
// number. The read is synchronous: rdata is the round-key register of the
// datapath, loaded every clock from the word group addressed by raddr_round,
// so a new round number shows on rdata one clock later. The word-wide write
// port and the 128-bit registered read port are this design's choices.
//
// Interface: clk; we, waddr (word 0..WORDS-1), wdata; raddr_round
// (0..WORDS/4-1), rdata (128 bits, word 4r in bits [127:96], one clock after
// raddr_round). A word written in the same clock as it is read shows its
// old value.
module roundkey_ram #(
  parameter int unsigned WORDS = 60
) (
  input  logic                         clk,
  input  logic                         we,
  input  logic [$clog2(WORDS)-1:0]     waddr,
  input  logic [31:0]                  wdata,
  input  logic [$clog2(WORDS/4)-1:0]   raddr_round,
  output logic [127:0]                 rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (4 * int'(raddr_round) + i < WORDS)
        rdata[127 - 32*i -: 32] <= mem[4 * int'(raddr_round) + i];
      else
        rdata[127 - 32*i -: 32] <= '0;
    end
  end

endmodule
