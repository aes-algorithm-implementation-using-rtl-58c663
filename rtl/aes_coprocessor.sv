// aes_coprocessor: AES hardware attached to a processor as custom instructions.
//
// The processor keeps the control flow in software and hands the expensive
// parts of AES to this unit through one extended, multi-cycle custom
// instruction: the extension field ci_n selects the operation (ci_op_e in
// aes_pkg) and ci_dataa / ci_datab carry the two 32-bit register operands.
// The unit holds its own registers (cipher key, key length, 128-bit state)
// and a round-key memory, so software loads a key, runs CI_KEY_EXPAND once
// to pre-compute every round key, then per 128-bit block writes four state
// words, runs CI_ENCRYPT or CI_DECRYPT and reads four words back. Software
// that keeps part of the round for itself instead calls the single-step
// operations (CI_SUBBYTES, CI_SHIFTROWS, CI_SR_ARK, CI_MIXCOL, CI_ARK) and
// does the rest on words read with CI_RD_STATE and written back with
// CI_WR_STATE.
//
// Inside: key_expand fills roundkey_ram; aes_core runs the rounds, reading
// round keys from the memory. Parameters as in aes_core: SBOX_KIND,
// NUM_SBOX, HW_MIXCOL, HW_SR_ARK; the key schedule uses four S-boxes of the
// same kind as the datapath.
//
// Handshake: ci_start is a one-clock pulse with ci_n, ci_dataa and ci_datab
// valid; ci_done pulses once with ci_result when the instruction completes,
// and the next ci_start may come in the clock after. Counted from the clock
// in which ci_start is high to the one in which ci_done is: register
// instructions take 1 clock, CI_KEY_EXPAND 4*(Nr+1) + 2 (46 for AES-128),
// CI_ENCRYPT/CI_DECRYPT Nr*(16/NUM_SBOX + 1) + 4 (54 for AES-128 with four
// S-boxes), CI_SUBBYTES 16/NUM_SBOX + 2, the other round steps 4. ci_result is the state word for CI_RD_STATE,
// CI_UNSUPPORTED for an unknown opcode or a unit that is not built, else 0.
// The opcode set, operand layout and timing are this design's choices; the
// described design names the custom-instruction mechanism but not its encoding.
module aes_coprocessor
  import aes_pkg::*;
#(
  parameter sbox_kind_e  SBOX_KIND = GSBOX,
  parameter int unsigned NUM_SBOX  = 4,
  parameter bit          HW_MIXCOL = 1'b1,
  parameter bit          HW_SR_ARK = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ci_start,
  input  logic [3:0]  ci_n,
  input  logic [31:0] ci_dataa,
  input  logic [31:0] ci_datab,
  output logic        ci_done,
  output logic [31:0] ci_result
);

  typedef enum logic [1:0] {C_IDLE, C_WAIT_KEY, C_WAIT_CORE} ci_fsm_e;

  ci_fsm_e      fsm_q;
  keylen_e      keylen_q;
  logic [255:0] key_q;

  // key schedule and round-key memory
  logic         ke_start, ke_busy, ke_done, ke_we;
  logic [5:0]   ke_waddr;
  logic [31:0]  ke_wdata;
  logic [3:0]   rk_round;
  logic [127:0] rk;

  key_expand #(.SBOX_KIND(SBOX_KIND)) u_key_expand (
    .clk   (clk),
    .rst_n (rst_n),
    .start (ke_start),
    .keylen(keylen_q),
    .key   (key_q),
    .busy  (ke_busy),
    .done  (ke_done),
    .we    (ke_we),
    .waddr (ke_waddr),
    .wdata (ke_wdata)
  );

  roundkey_ram #(.WORDS(MAX_WORDS)) u_rk_ram (
    .clk        (clk),
    .we         (ke_we),
    .waddr      (ke_waddr),
    .wdata      (ke_wdata),
    .raddr_round(rk_round),
    .rdata      (rk)
  );

  // round datapath
  logic         core_start, core_busy, core_done, core_unsup;
  core_op_e     core_op;
  logic         st_we;
  logic [127:0] state;

  aes_core #(
    .SBOX_KIND(SBOX_KIND),
    .NUM_SBOX (NUM_SBOX),
    .HW_MIXCOL(HW_MIXCOL),
    .HW_SR_ARK(HW_SR_ARK)
  ) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (core_start),
    .op         (core_op),
    .inv        (ci_dataa[0]),
    .op_round   (ci_datab[3:0]),
    .nr         (nr_of(keylen_q)),
    .busy       (core_busy),
    .done       (core_done),
    .unsupported(core_unsup),
    .st_we      (st_we),
    .st_widx    (ci_dataa[1:0]),
    .st_wdata   (ci_datab),
    .state      (state),
    .rk_round   (rk_round),
    .rk         (rk)
  );

  // instruction decode
  logic idle_start;
  assign idle_start = ci_start && fsm_q == C_IDLE;

  always_comb begin
    ke_start   = 1'b0;
    core_start = 1'b0;
    core_op    = OP_ENC;
    st_we      = 1'b0;
    if (idle_start) begin
      case (ci_n)
        CI_KEY_EXPAND: ke_start = 1'b1;
        CI_WR_STATE:   st_we    = 1'b1;
        CI_ENCRYPT:    begin core_start = 1'b1; core_op = OP_ENC;    end
        CI_DECRYPT:    begin core_start = 1'b1; core_op = OP_DEC;    end
        CI_SUBBYTES:   begin core_start = 1'b1; core_op = OP_SUB;    end
        CI_SR_ARK:     begin core_start = 1'b1; core_op = OP_SR_ARK; end
        CI_MIXCOL:     begin core_start = 1'b1; core_op = OP_MIX;    end
        CI_ARK:        begin core_start = 1'b1; core_op = OP_ARK;    end
        CI_SHIFTROWS:  begin core_start = 1'b1; core_op = OP_SR;     end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q     <= C_IDLE;
      keylen_q  <= KEY128;
      key_q     <= '0;
      ci_done   <= 1'b0;
      ci_result <= '0;
    end else begin
      ci_done <= 1'b0;
      case (fsm_q)
        C_IDLE: begin
          if (ci_start) begin
            ci_result <= '0;
            case (ci_n)
              CI_SET_KEYLEN: begin
                keylen_q <= (ci_dataa[1:0] == 2'd3) ? KEY128 : keylen_e'(ci_dataa[1:0]);
                ci_done  <= 1'b1;
              end
              CI_WR_KEY: begin
                key_q[255 - 32*ci_dataa[2:0] -: 32] <= ci_datab;
                ci_done <= 1'b1;
              end
              CI_KEY_EXPAND: fsm_q <= C_WAIT_KEY;
              CI_WR_STATE:   ci_done <= 1'b1;
              CI_RD_STATE: begin
                ci_result <= state[127 - 32*ci_dataa[1:0] -: 32];
                ci_done   <= 1'b1;
              end
              CI_ENCRYPT, CI_DECRYPT, CI_SUBBYTES, CI_SR_ARK, CI_MIXCOL, CI_ARK,
              CI_SHIFTROWS:
                fsm_q <= C_WAIT_CORE;
              default: begin
                ci_result <= CI_UNSUPPORTED;
                ci_done   <= 1'b1;
              end
            endcase
          end
        end
        C_WAIT_KEY: begin
          if (ke_done) begin
            fsm_q   <= C_IDLE;
            ci_done <= 1'b1;
          end
        end
        C_WAIT_CORE: begin
          if (core_done) begin
            fsm_q     <= C_IDLE;
            ci_done   <= 1'b1;
            ci_result <= core_unsup ? CI_UNSUPPORTED : 32'h0;
          end
        end
        default: fsm_q <= C_IDLE;
      endcase
    end
  end

  // Key expansion and the datapath never run at the same time: both are
  // started only from C_IDLE, which waits for the running one to finish.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(ke_busy && core_busy));

  // Handshake rule: a new instruction is issued only when none is pending.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    ci_start |-> fsm_q == C_IDLE);

endmodule
