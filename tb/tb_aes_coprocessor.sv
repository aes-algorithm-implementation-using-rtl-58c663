// tb_aes_coprocessor: end-to-end test of the coprocessor through its
// custom-instruction port, with every parameter at its default.
//
// Acting as the processor, it issues instructions the way the driving
// software would:
//  * for AES-128, -192 and -256: set the key length, write the cipher key,
//    pre-compute the round keys (latency 4*(Nr+1) + 2 checked);
//  * encrypt 32 blocks of 128 bits one after another with CI_ENCRYPT (the
//    evaluated workload; fewer blocks for the longer keys) and compare each
//    with the reference cipher and, for the FIPS-197 keys, the published
//    ciphertext; latency Nr*(16/NUM_SBOX + 1) + 4 checked, and the clocks of
//    the whole run (71 per AES-128 block); decrypt them all back with
//    CI_DECRYPT;
//  * encrypt and decrypt a block with the round split between hardware and
//    "software": single-step instructions only, and once with MixColumns done
//    in the testbench on words read out and written back;
//  * issue an opcode that does not exist and expect CI_UNSUPPORTED.
// Each mechanism is counted, and one that never happened counts a failure.
module tb_aes_coprocessor;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned NUM_SBOX = 4;   // the coprocessor's default

  logic        clk = 1'b0;
  logic        rst_n;
  logic        ci_start;
  logic [3:0]  ci_n;
  logic [31:0] ci_dataa, ci_datab;
  logic        ci_done;
  logic [31:0] ci_result;
  int          checks = 0;
  int          failures = 0;

  // mechanism counters
  int n_keyexp [3];
  int n_enc_blocks = 0, n_dec_blocks = 0;
  int n_sub = 0, n_sr = 0, n_sr_ark = 0, n_mix = 0, n_ark = 0, n_sw_mix = 0, n_unsup = 0;

  aes_coprocessor dut (.*);

  always #5 clk = ~clk;

  task automatic ci(ci_op_e n, logic [31:0] a, logic [31:0] b, output logic [31:0] res, output int lat);
    @(negedge clk);
    ci_n = 4'(n); ci_dataa = a; ci_datab = b; ci_start = 1'b1;
    @(negedge clk);
    ci_start = 1'b0;
    lat = 1;
    while (!ci_done && lat < 1000) begin
      @(negedge clk);
      lat++;
    end
    res = ci_result;
  endtask

  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%08h exp=%08h", what, got, exp);
    end
  endtask

  task automatic expect128(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  task automatic expect_lat(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s latency %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr_state(logic [127:0] s);
    logic [31:0] r; int l;
    for (int i = 0; i < 4; i++) ci(CI_WR_STATE, i, s[127-32*i -: 32], r, l);
  endtask

  task automatic rd_state(output logic [127:0] s);
    logic [31:0] r; int l;
    for (int i = 0; i < 4; i++) begin
      ci(CI_RD_STATE, i, 0, r, l);
      s[127-32*i -: 32] = r;
    end
  endtask

  task automatic step(ci_op_e n, logic [31:0] a, logic [31:0] b, int exp_lat);
    logic [31:0] r; int l;
    ci(n, a, b, r, l);
    expect32("step result", r, 32'h0);
    expect_lat("step", l, exp_lat);
  endtask

  task automatic set_key(int kl, logic [255:0] key);
    logic [31:0] r; int l, nr;
    nr = 10 + 2 * kl;
    ci(CI_SET_KEYLEN, kl, 0, r, l);
    expect_lat("set_keylen", l, 1);
    for (int i = 0; i < 8; i++) ci(CI_WR_KEY, i, key[255-32*i -: 32], r, l);
    ci(CI_KEY_EXPAND, 0, 0, r, l);
    expect_lat("key_expand", l, 4 * (nr + 1) + 2);
    n_keyexp[kl]++;
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // the evaluated workload: a run of blocks encrypted back to back, then decrypted
  task automatic packets(int kl, logic [255:0] key, int count, logic [127:0] pt0, logic [127:0] ct0);
    logic [127:0] pt [32];
    logic [127:0] ct [32];
    logic [127:0] s;
    logic [31:0] r; int l, nk, nr, clocks;
    time t0;
    nk = 4 + 2 * kl;
    nr = nk + 6;
    set_key(kl, key);
    t0 = $time;
    for (int p = 0; p < count; p++) begin
      pt[p] = (p == 0) ? pt0 : rnd128();
      wr_state(pt[p]);
      ci(CI_ENCRYPT, 0, 0, r, l);
      expect32("encrypt result", r, 32'h0);
      expect_lat("encrypt", l, nr * (16 / NUM_SBOX + 1) + 4);
      rd_state(s);
      ct[p] = s;
      expect128("encrypt", s, encrypt(pt[p], key, nk));
      if (p == 0 && ct0 != '0) expect128("encrypt known answer", s, ct0);
      n_enc_blocks++;
    end
    // 4 writes, CI_ENCRYPT, 4 reads per block; each instruction takes its
    // latency plus the clock in which the next one is issued
    clocks = int'(($time - t0) / 10);
    $display("  %0d blocks, key length %0d bits: %0d clocks of instruction traffic", count, 128 + 64 * kl, clocks);
    expect_lat("block run", clocks, count * (8 * 2 + nr * (16 / NUM_SBOX + 1) + 4 + 1));
    for (int p = 0; p < count; p++) begin
      wr_state(ct[p]);
      ci(CI_DECRYPT, 0, 0, r, l);
      expect_lat("decrypt", l, nr * (16 / NUM_SBOX + 1) + 4);
      rd_state(s);
      expect128("decrypt", s, pt[p]);
      n_dec_blocks++;
    end
  endtask

  // one block with the round done by single-step instructions
  task automatic split_block(int kl, logic [255:0] key, bit sw_mix);
    logic [127:0] pt, s, exp;
    int nk, nr;
    nk = 4 + 2 * kl;
    nr = nk + 6;
    pt = rnd128();
    wr_state(pt);
    step(CI_ARK, 0, 0, 4); n_ark++;
    for (int r = 1; r <= nr; r++) begin
      step(CI_SUBBYTES, 0, 0, 16 / NUM_SBOX + 2); n_sub++;
      if (r == nr) begin
        step(CI_SR_ARK, 0, r, 4); n_sr_ark++;
      end else begin
        step(CI_SHIFTROWS, 0, 0, 4); n_sr++;
        if (sw_mix) begin
          rd_state(s);
          wr_state(mixcolumns(s, 1'b0));
          n_sw_mix++;
        end else begin
          step(CI_MIXCOL, 0, 0, 4); n_mix++;
        end
        step(CI_ARK, 0, r, 4); n_ark++;
      end
    end
    rd_state(s);
    exp = encrypt(pt, key, nk);
    expect128("split encrypt", s, exp);
    // inverse cipher: InvSubBytes and InvShiftRows commute
    step(CI_ARK, 0, nr, 4); n_ark++;
    for (int r = nr - 1; r >= 0; r--) begin
      step(CI_SUBBYTES, 1, 0, 16 / NUM_SBOX + 2); n_sub++;
      step(CI_SR_ARK, 1, r, 4); n_sr_ark++;
      if (r != 0) begin
        step(CI_MIXCOL, 1, 0, 4); n_mix++;
      end
    end
    rd_state(s);
    expect128("split decrypt", s, pt);
  endtask

  task automatic must_happen(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    logic [31:0] r; int l;
    rst_n = 1'b0; ci_start = 1'b0; ci_n = '0; ci_dataa = '0; ci_datab = '0;
    for (int i = 0; i < 3; i++) n_keyexp[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    packets(0, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 32,
            128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    split_block(0, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 1'b0);
    split_block(0, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 1'b1);
    packets(1, {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, 4,
            128'h00112233445566778899aabbccddeeff, 128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    begin
      logic [255:0] k;
      k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
      packets(2, k, 4, 128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089);
      split_block(2, k, 1'b0);
    end

    ci(ci_op_e'(4'd15), 0, 0, r, l);
    expect32("unknown opcode", r, CI_UNSUPPORTED);
    if (r == CI_UNSUPPORTED) n_unsup++;

    $display("mechanisms exercised:");
    must_happen("key expansion AES-128", n_keyexp[0]);
    must_happen("key expansion AES-192", n_keyexp[1]);
    must_happen("key expansion AES-256", n_keyexp[2]);
    must_happen("hardware block encryption", n_enc_blocks);
    must_happen("hardware block decryption", n_dec_blocks);
    must_happen("SubBytes instruction", n_sub);
    must_happen("ShiftRows instruction", n_sr);
    must_happen("ShiftRows+AddRoundKey instr", n_sr_ark);
    must_happen("MixColumns instruction", n_mix);
    must_happen("AddRoundKey instruction", n_ark);
    must_happen("MixColumns in software", n_sw_mix);
    must_happen("unsupported opcode", n_unsup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
