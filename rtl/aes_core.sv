// aes_core: AES round datapath and its controller.
//
// The 128-bit state register doubles as a byte shift register: SubBytes
// moves the NUM_SBOX leading bytes through the S-boxes and appends them at
// the tail, so after 16/NUM_SBOX clocks every byte has been substituted and
// is back in place. One more clock then applies the rest of the round in
// combinational logic: ShiftRows (wiring), MixColumns (XOR network, four
// column units) and AddRoundKey (XOR with the round-key register, the
// registered read port of the round-key memory). The key of the next round
// is fetched while SubBytes runs; a whole block or a single key step first
// spends one clock fetching its first key. The final encryption round skips MixColumns.
// Decryption runs the inverse round: InvSubBytes, InvShiftRows, AddRoundKey,
// then InvMixColumns (skipped after round key 0).
//
// Besides whole blocks, each transform can be run alone (OP_SUB, OP_SR_ARK,
// OP_SR, OP_MIX, OP_ARK), so software can do the remaining steps of a round itself.
// Parameters choose the hardware/software split: SBOX_KIND (table or
// composite-field S-box), NUM_SBOX (1, 4, 8 or 16 S-boxes), HW_MIXCOL and
// HW_SR_ARK (whether those units are built). An operation whose unit is
// missing completes at once with `unsupported` set; whole blocks need both.
// The split, the state shift register feeding the S-boxes, the MixColumns
// unit and the round-key input follow the described design; the exact
// sequencing, the decryption order and the handshake are this design's.
//
// Timing: start is taken in IDLE; done is high for one clock, counted here
// in clocks after the clock in which start is high. Whole block:
// Nr * (16/NUM_SBOX + 1) + 3 (53 for AES-128 with 4 S-boxes): one clock to
// fetch the first round key, one for the first AddRoundKey, 16/NUM_SBOX + 1
// per round, one for done. OP_SUB: 16/NUM_SBOX + 1; other single
// operations: 3. rk must be the key of the round that rk_round showed one
// clock earlier. The state may be written (st_we) only while idle.
module aes_core
  import aes_pkg::*;
#(
  parameter sbox_kind_e  SBOX_KIND = GSBOX,
  parameter int unsigned NUM_SBOX  = 4,
  parameter bit          HW_MIXCOL = 1'b1,
  parameter bit          HW_SR_ARK = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  // command
  input  logic         start,
  input  core_op_e     op,
  input  logic         inv,        // inverse transform for single operations
  input  logic [3:0]   op_round,   // round key for OP_SR_ARK / OP_ARK
  input  logic [3:0]   nr,         // number of rounds (10, 12, 14)
  output logic         busy,
  output logic         done,
  output logic         unsupported,
  // state access
  input  logic         st_we,
  input  logic [1:0]   st_widx,
  input  logic [31:0]  st_wdata,
  output logic [127:0] state,
  // round-key memory read port
  output logic [3:0]   rk_round,
  input  logic [127:0] rk
);

  localparam int unsigned SUB_CYCLES = 16 / NUM_SBOX;
  localparam int unsigned SB_BITS    = 8 * NUM_SBOX;

  if (NUM_SBOX != 1 && NUM_SBOX != 4 && NUM_SBOX != 8 && NUM_SBOX != 16) begin : g_bad_num_sbox
    $error("aes_core: NUM_SBOX must be 1, 4, 8 or 16");
  end

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_INIT, S_SUB, S_STEP, S_SINGLE} fsm_e;

  fsm_e         fsm_q;
  core_op_e     op_q;
  logic         inv_q;      // inverse direction (decryption)
  logic [3:0]   round_q;
  logic [3:0]   nr_q;
  logic [4:0]   cnt_q;
  logic [127:0] state_q;

  // ---------------- S-boxes on the head of the shift register ----------------
  logic [SB_BITS-1:0] sb_in, sb_out;
  assign sb_in = state_q[127 -: SB_BITS];

  for (genvar g = 0; g < NUM_SBOX; g++) begin : g_sbox
    aes_sbox #(.KIND(SBOX_KIND)) u_sbox (
      .din (sb_in[SB_BITS - 1 - 8*g -: 8]),
      .inv (inv_q),
      .dout(sb_out[SB_BITS - 1 - 8*g -: 8])
    );
  end

  logic [127:0] sub_shifted;
  if (NUM_SBOX == 16) begin : g_sub_all
    assign sub_shifted = sb_out;
  end else begin : g_sub_part
    assign sub_shifted = {state_q[127 - SB_BITS : 0], sb_out};
  end

  // ---------------- round step: ShiftRows / MixColumns / AddRoundKey ----------------
  logic         last_enc;     // final encryption round: no MixColumns
  logic         sr_do_shift;
  logic [127:0] sr_key, sr_out, mc_in, mc_out;

  always_comb begin
    last_enc    = (round_q == nr_q);
    sr_do_shift = !(fsm_q == S_SINGLE && op_q == OP_ARK);
    // encryption adds the key after MixColumns, so the SR unit gets zero then
    if (fsm_q == S_STEP && !inv_q && !last_enc)  sr_key = '0;
    else if (fsm_q == S_SINGLE && op_q == OP_SR) sr_key = '0;
    else                                          sr_key = rk;
    mc_in = (fsm_q == S_SINGLE) ? state_q : sr_out;
  end

  if (HW_SR_ARK) begin : g_sr_ark
    shift_rows_ark u_sr_ark (
      .state_in (state_q),
      .round_key(sr_key),
      .inv      (inv_q),
      .do_shift (sr_do_shift),
      .state_out(sr_out)
    );
  end else begin : g_no_sr_ark
    assign sr_out = state_q;
  end

  if (HW_MIXCOL) begin : g_mixcol
    for (genvar c = 0; c < 4; c++) begin : g_col
      mix_columns u_mc (
        .col_in (mc_in[127 - 32*c -: 32]),
        .inv    (inv_q),
        .col_out(mc_out[127 - 32*c -: 32])
      );
    end
  end else begin : g_no_mixcol
    assign mc_out = mc_in;
  end

  logic [127:0] step_next;
  always_comb begin
    if (!inv_q) step_next = last_enc ? sr_out : (mc_out ^ rk);
    else        step_next = (round_q == 4'd0) ? sr_out : mc_out;
  end

  function automatic logic op_supported(core_op_e o);
    case (o)
      OP_ENC, OP_DEC:    return HW_MIXCOL && HW_SR_ARK;
      OP_SR_ARK, OP_ARK, OP_SR: return HW_SR_ARK;
      OP_MIX:            return HW_MIXCOL;
      default:           return 1'b1;
    endcase
  endfunction

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q       <= S_IDLE;
      op_q        <= OP_ENC;
      inv_q       <= 1'b0;
      round_q     <= '0;
      nr_q        <= 4'd10;
      cnt_q       <= '0;
      state_q     <= '0;
      done        <= 1'b0;
      unsupported <= 1'b0;
    end else begin
      done <= 1'b0;
      case (fsm_q)
        S_IDLE: begin
          if (st_we) state_q[127 - 32*st_widx -: 32] <= st_wdata;
          if (start) begin
            op_q        <= op;
            nr_q        <= nr;
            cnt_q       <= '0;
            unsupported <= 1'b0;
            if (!op_supported(op)) begin
              unsupported <= 1'b1;
              done        <= 1'b1;
            end else begin
              case (op)
                OP_ENC: begin inv_q <= 1'b0; round_q <= 4'd0;     fsm_q <= S_FETCH; end
                OP_DEC: begin inv_q <= 1'b1; round_q <= nr;       fsm_q <= S_FETCH; end
                OP_SUB: begin inv_q <= inv;                        fsm_q <= S_SUB;   end
                default: begin inv_q <= inv; round_q <= op_round; fsm_q <= S_FETCH; end
              endcase
            end
          end
        end
        S_FETCH: begin                      // round-key register loads key round_q
          fsm_q <= (op_q == OP_ENC || op_q == OP_DEC) ? S_INIT : S_SINGLE;
        end
        S_INIT: begin                       // initial AddRoundKey
          state_q <= state_q ^ rk;
          round_q <= inv_q ? round_q - 4'd1 : round_q + 4'd1;
          fsm_q   <= S_SUB;
        end
        S_SUB: begin
          state_q <= sub_shifted;
          cnt_q   <= cnt_q + 5'd1;
          if (cnt_q == 5'(SUB_CYCLES - 1)) begin
            if (op_q == OP_SUB) begin
              fsm_q <= S_IDLE;
              done  <= 1'b1;
            end else begin
              fsm_q <= S_STEP;
            end
          end
        end
        S_STEP: begin
          state_q <= step_next;
          cnt_q   <= '0;
          if ((!inv_q && last_enc) || (inv_q && round_q == 4'd0)) begin
            fsm_q <= S_IDLE;
            done  <= 1'b1;
          end else begin
            round_q <= inv_q ? round_q - 4'd1 : round_q + 4'd1;
            fsm_q   <= S_SUB;
          end
        end
        S_SINGLE: begin
          state_q <= (op_q == OP_MIX) ? mc_out : sr_out;
          fsm_q   <= S_IDLE;
          done    <= 1'b1;
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

  assign busy     = (fsm_q != S_IDLE);
  assign state    = state_q;
  assign rk_round = round_q;

endmodule
