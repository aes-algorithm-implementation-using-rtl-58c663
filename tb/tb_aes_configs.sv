// tb_aes_configs: the hardware/software design space of the coprocessor.
//
// Five coprocessors with different parameters receive the same instruction
// stream in parallel:
//   0: table S-box,  1 S-box           1: logic S-box, 8 S-boxes
//   2: table S-box, 16 S-boxes         3: logic S-box, 4, no MixColumns unit
//   4: table S-box,  4, no ShiftRows+AddRoundKey unit
// Keys of all three lengths are expanded; blocks are encrypted and decrypted
// and compared with aes_ref_pkg, with each unit's latency checked against
// Nr*(16/NUM_SBOX + 1) + 4. Units 3 and 4 must answer CI_UNSUPPORTED for
// whole blocks and for the instruction whose unit they lack, and still run
// the instructions whose units they have.
module tb_aes_configs;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int N = 5;
  localparam int NSB [N] = '{1, 8, 16, 4, 4};

  logic        clk = 1'b0;
  logic        rst_n;
  logic        ci_start;
  logic [3:0]  ci_n;
  logic [31:0] ci_dataa, ci_datab;
  logic        ci_done   [N];
  logic [31:0] ci_result [N];
  logic [31:0] res [N];
  int          lat [N];
  int          checks = 0;
  int          failures = 0;
  int          n_unsup = 0, n_blocks = 0;

  aes_coprocessor #(.SBOX_KIND(TSBOX), .NUM_SBOX(1)) u0 (
    .clk, .rst_n, .ci_start, .ci_n, .ci_dataa, .ci_datab, .ci_done(ci_done[0]), .ci_result(ci_result[0]));
  aes_coprocessor #(.SBOX_KIND(GSBOX), .NUM_SBOX(8)) u1 (
    .clk, .rst_n, .ci_start, .ci_n, .ci_dataa, .ci_datab, .ci_done(ci_done[1]), .ci_result(ci_result[1]));
  aes_coprocessor #(.SBOX_KIND(TSBOX), .NUM_SBOX(16)) u2 (
    .clk, .rst_n, .ci_start, .ci_n, .ci_dataa, .ci_datab, .ci_done(ci_done[2]), .ci_result(ci_result[2]));
  aes_coprocessor #(.SBOX_KIND(GSBOX), .NUM_SBOX(4), .HW_MIXCOL(1'b0)) u3 (
    .clk, .rst_n, .ci_start, .ci_n, .ci_dataa, .ci_datab, .ci_done(ci_done[3]), .ci_result(ci_result[3]));
  aes_coprocessor #(.SBOX_KIND(TSBOX), .NUM_SBOX(4), .HW_SR_ARK(1'b0)) u4 (
    .clk, .rst_n, .ci_start, .ci_n, .ci_dataa, .ci_datab, .ci_done(ci_done[4]), .ci_result(ci_result[4]));

  always #5 clk = ~clk;

  // issue one instruction to all units and wait until every one is done
  task automatic ci(ci_op_e n, logic [31:0] a, logic [31:0] b);
    bit seen [N];
    int cyc;
    bit all;
    @(negedge clk);
    ci_n = 4'(n); ci_dataa = a; ci_datab = b; ci_start = 1'b1;
    for (int u = 0; u < N; u++) seen[u] = 1'b0;
    @(negedge clk);
    ci_start = 1'b0;
    cyc = 1;
    all = 1'b0;
    while (!all && cyc < 2000) begin
      all = 1'b1;
      for (int u = 0; u < N; u++) begin
        if (!seen[u] && ci_done[u]) begin
          seen[u] = 1'b1; lat[u] = cyc; res[u] = ci_result[u];
        end
        all &= seen[u];
      end
      if (!all) begin
        @(negedge clk);
        cyc++;
      end
    end
    checks++;
    if (!all) begin
      failures++;
      $display("FAIL instruction %0d never completed on some unit", n);
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic expect_val(string what, int u, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL unit %0d %s got=%032h exp=%032h", u, what, got, exp);
    end
  endtask

  logic [127:0] st [N];

  task automatic wr_state(logic [127:0] s);
    for (int i = 0; i < 4; i++) ci(CI_WR_STATE, i, s[127-32*i -: 32]);
  endtask

  task automatic rd_state();
    for (int i = 0; i < 4; i++) begin
      ci(CI_RD_STATE, i, 0);
      for (int u = 0; u < N; u++) st[u][127-32*i -: 32] = res[u];
    end
  endtask

  task automatic run_key(int kl, logic [255:0] key);
    logic [127:0] pt, ct;
    int nk, nr;
    nk = 4 + 2 * kl;
    nr = nk + 6;
    ci(CI_SET_KEYLEN, kl, 0);
    for (int i = 0; i < 8; i++) ci(CI_WR_KEY, i, key[255-32*i -: 32]);
    ci(CI_KEY_EXPAND, 0, 0);
    for (int u = 0; u < N; u++) expect_val("key expansion latency", u, lat[u], 4 * (nr + 1) + 2);
    for (int b = 0; b < 2; b++) begin
      pt = rnd128();
      ct = encrypt(pt, key, nk);
      wr_state(pt);
      ci(CI_ENCRYPT, 0, 0);
      for (int u = 0; u < 3; u++) begin
        expect_val("encrypt latency", u, lat[u], nr * (16 / NSB[u] + 1) + 4);
        expect_val("encrypt result", u, res[u], 0);
      end
      for (int u = 3; u < 5; u++) begin
        expect_val("encrypt unsupported", u, res[u], CI_UNSUPPORTED);
        if (res[u] == CI_UNSUPPORTED) n_unsup++;
      end
      rd_state();
      for (int u = 0; u < 3; u++) expect_val("ciphertext", u, st[u], ct);
      wr_state(ct);
      ci(CI_DECRYPT, 0, 0);
      rd_state();
      for (int u = 0; u < 3; u++) expect_val("plaintext", u, st[u], pt);
      n_blocks++;
    end
    // single steps on the partial units
    pt = rnd128();
    wr_state(pt);
    ci(CI_SUBBYTES, 0, 0);
    rd_state();
    for (int u = 0; u < N; u++) expect_val("subbytes", u, st[u], subbytes(pt, 1'b0));
    ci(CI_MIXCOL, 0, 0);
    expect_val("mixcol unsupported", 3, res[3], CI_UNSUPPORTED);
    expect_val("mixcol supported", 4, res[4], 0);
    rd_state();
    expect_val("mixcol", 4, st[4], mixcolumns(subbytes(pt, 1'b0), 1'b0));
    expect_val("mixcol skipped", 3, st[3], subbytes(pt, 1'b0));
    ci(CI_SR_ARK, 0, 1);
    expect_val("sr_ark unsupported", 4, res[4], CI_UNSUPPORTED);
    expect_val("sr_ark supported", 3, res[3], 0);
    rd_state();
    expect_val("sr_ark", 3, st[3], shiftrows(subbytes(pt, 1'b0), 1'b0) ^ rkey(expand(key, nk), 1));
  endtask

  initial begin
    rst_n = 1'b0; ci_start = 1'b0; ci_n = '0; ci_dataa = '0; ci_datab = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_key(0, {rnd128(), 128'h0});
    run_key(1, {rnd128(), rnd128()});
    run_key(2, {rnd128(), rnd128()});
    checks++;
    if (n_unsup == 0 || n_blocks == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: unsupported=%0d blocks=%0d", n_unsup, n_blocks);
    end
    $display("blocks per unit: %0d, unsupported answers: %0d", n_blocks, n_unsup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
