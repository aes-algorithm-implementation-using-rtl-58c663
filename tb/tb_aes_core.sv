// tb_aes_core: checks the round datapath with a model round-key memory.
//
// The round-key input is served from the reference key schedule of
// aes_ref_pkg, looked up by the core's rk_round output one clock late, so the core is
// tested apart from key_expand. For each key length the FIPS-197 Appendix C
// vector is encrypted and decrypted and compared with the published
// ciphertext; random blocks are compared with the reference cipher. Whole
// blocks must take Nr*(16/NUM_SBOX + 1) + 3 clocks from start to done. Each single-step
// operation (SubBytes, ShiftRows+AddRoundKey, MixColumns, AddRoundKey, in
// both directions) is compared with the reference transform, and SubBytes
// must take 16/NUM_SBOX + 1 clocks, the others 3.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned NUM_SBOX = 4;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  core_op_e     op;
  logic         inv;
  logic [3:0]   op_round;
  logic [3:0]   nr;
  logic         busy, done, unsupported;
  logic         st_we;
  logic [1:0]   st_widx;
  logic [31:0]  st_wdata;
  logic [127:0] state;
  logic [3:0]   rk_round;
  logic [127:0] rk;
  words_t       w;
  int           checks = 0;
  int           failures = 0;

  aes_core #(.NUM_SBOX(NUM_SBOX)) dut (.*);

  always #5 clk = ~clk;

  // model round-key memory with a registered read, like roundkey_ram
  always_ff @(posedge clk) rk <= rkey(w, int'(rk_round));

  task automatic load(logic [127:0] s);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      st_we = 1'b1; st_widx = 2'(i); st_wdata = s[127-32*i -: 32];
    end
    @(negedge clk);
    st_we = 1'b0;
  endtask

  // run one operation; returns the clocks from start high to done high
  task automatic run(core_op_e o, logic i, int rnd, output int cycles);
    @(negedge clk);
    op = o; inv = i; op_round = 4'(rnd); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;   // clocks from the one with start high to the one with done high
    while (!done && cycles < 500) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  task automatic expect_cycles(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s took %0d clocks, expected %0d", what, got, exp);
    end
  endtask

  task automatic block(logic [127:0] pt, logic [255:0] key, int nk, logic [127:0] ct_exp, bit known);
    int cyc;
    logic [127:0] ct;
    w  = expand(key, nk);
    nr = 4'(nk + 6);
    ct = known ? ct_exp : encrypt(pt, key, nk);
    load(pt);
    run(OP_ENC, 1'b0, 0, cyc);
    expect_eq("encrypt", state, ct);
    expect_cycles("encrypt", cyc, 3 + (nk + 6) * (16 / NUM_SBOX + 1));
    load(ct);
    run(OP_DEC, 1'b0, 0, cyc);
    expect_eq("decrypt", state, pt);
    expect_cycles("decrypt", cyc, 3 + (nk + 6) * (16 / NUM_SBOX + 1));
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    int cyc;
    logic [127:0] s;
    logic [255:0] k;
    rst_n = 1'b0; start = 1'b0; op = OP_ENC; inv = 1'b0; op_round = '0; nr = 4'd10;
    st_we = 1'b0; st_widx = '0; st_wdata = '0;
    w = expand('0, 4);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    block(128'h00112233445566778899aabbccddeeff, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 4,
          128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1'b1);
    block(128'h00112233445566778899aabbccddeeff,
          {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, 6,
          128'hdda97ca4864cdfe06eaf70a0ec0d7191, 1'b1);
    block(128'h00112233445566778899aabbccddeeff,
          256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 8,
          128'h8ea2b7ca516745bfeafc49904b496089, 1'b1);
    block(128'h3243f6a8885a308d313198a2e0370734, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 4,
          128'h3925841d02dc09fbdc118597196a0b32, 1'b1);
    for (int n = 0; n < 6; n++) begin
      k = {rnd128(), rnd128()};
      block(rnd128(), k, 4 + 2 * (n % 3), '0, 1'b0);
    end

    // single-step operations
    k = {rnd128(), rnd128()};
    w = expand(k, 8);
    nr = 4'd14;
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 2; i++) begin
        s = rnd128(); load(s);
        run(OP_SUB, 1'(i), 0, cyc);
        expect_eq("subbytes", state, subbytes(s, 1'(i)));
        expect_cycles("subbytes", cyc, 16 / NUM_SBOX + 1);
        s = rnd128(); load(s);
        run(OP_SR_ARK, 1'(i), 3 + n, cyc);
        expect_eq("sr_ark", state, shiftrows(s, 1'(i)) ^ rkey(w, 3 + n));
        expect_cycles("sr_ark", cyc, 3);
        s = rnd128(); load(s);
        run(OP_SR, 1'(i), 5, cyc);
        expect_eq("shiftrows", state, shiftrows(s, 1'(i)));
        s = rnd128(); load(s);
        run(OP_MIX, 1'(i), 0, cyc);
        expect_eq("mixcolumns", state, mixcolumns(s, 1'(i)));
        s = rnd128(); load(s);
        run(OP_ARK, 1'(i), 14 - n, cyc);
        expect_eq("ark", state, s ^ rkey(w, 14 - n));
        checks++;
        if (unsupported) begin
          failures++;
          $display("FAIL unsupported flag set");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
