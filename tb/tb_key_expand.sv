// tb_key_expand: checks the round-key pre-computation for all key lengths.
//
// For each key length the FIPS-197 Appendix A cipher key is expanded and
// its last key word compared with the published value; then random keys of
// every length are expanded. Every word written to the memory port is
// compared with the reference key schedule of aes_ref_pkg, the write
// addresses must run 0..4*(Nr+1)-1 in order, and the clocks from start to
// done must be the number of words plus one (45, 53, 61), counted from the
// clock with start high to the clock with done high.
module tb_key_expand;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  keylen_e      keylen;
  logic [255:0] key;
  logic         busy, done, we;
  logic [5:0]   waddr;
  logic [31:0]  wdata;
  int           checks = 0;
  int           failures = 0;

  key_expand dut (.*);

  always #5 clk = ~clk;

  logic [31:0] got [60];

  task automatic run(keylen_e kl, logic [255:0] k, logic [31:0] last_exp, bit check_last);
    words_t w;
    int nk, nw, cycles, nwrites;
    bit order_ok;
    nk = (kl == KEY128) ? 4 : (kl == KEY192) ? 6 : 8;
    nw = 4 * (nk + 7);
    w = expand(k, nk);
    @(negedge clk);
    keylen = kl; key = k; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; nwrites = 0; order_ok = 1'b1;
    while (!done && cycles < 200) begin
      if (we) begin
        got[waddr] = wdata;
        if (int'(waddr) != nwrites) order_ok = 1'b0;
        nwrites++;
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != nw + 1 || nwrites != nw || !order_ok) begin
      failures++;
      $display("FAIL nk=%0d cycles=%0d writes=%0d order_ok=%0d", nk, cycles, nwrites, order_ok);
    end
    for (int i = 0; i < nw; i++) begin
      checks++;
      if (got[i] !== w[i]) begin
        failures++;
        if (failures < 10) $display("FAIL nk=%0d w[%0d]=%08h exp %08h", nk, i, got[i], w[i]);
      end
    end
    if (check_last) begin
      checks++;
      if (got[nw-1] !== last_exp) begin
        failures++;
        $display("FAIL nk=%0d last word %08h exp %08h", nk, got[nw-1], last_exp);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; keylen = KEY128; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(KEY128, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 32'hb6630ca6, 1'b1);
    run(KEY192, {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0}, 32'h01002202, 1'b1);
    run(KEY256, 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4, 32'h706c631e, 1'b1);
    for (int n = 0; n < 6; n++) begin
      logic [255:0] k;
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      run(keylen_e'(n % 3), k, '0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
