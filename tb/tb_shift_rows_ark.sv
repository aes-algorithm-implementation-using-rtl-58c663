// tb_shift_rows_ark: checks (Inv)ShiftRows followed by AddRoundKey.
//
// A literal case with byte values equal to their index shows the row
// rotations directly; random states and keys are then compared with the
// reference ShiftRows of aes_ref_pkg, in both directions and with the shift
// disabled (AddRoundKey alone).
module tb_shift_rows_ark;
  import aes_ref_pkg::*;

  logic         clk = 1'b0;
  logic [127:0] state_in, round_key, state_out;
  logic         inv, do_shift;
  int           checks = 0;
  int           failures = 0;

  shift_rows_ark dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] s, logic [127:0] k, logic i, logic sh, logic [127:0] exp);
    state_in  = s;
    round_key = k;
    inv       = i;
    do_shift  = sh;
    @(posedge clk);
    checks++;
    if (state_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL inv=%0d sh=%0d got=%032h exp=%032h", i, sh, state_out, exp);
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [127:0] s, k;
    // bytes 00..0f in column order; row r rotated left by r
    check(128'h000102030405060708090a0b0c0d0e0f, '0, 1'b0, 1'b1,
          128'h00050a0f04090e03080d02070c01060b);
    check(128'h00050a0f04090e03080d02070c01060b, '0, 1'b1, 1'b1,
          128'h000102030405060708090a0b0c0d0e0f);
    for (int n = 0; n < 300; n++) begin
      s = rnd128();
      k = rnd128();
      check(s, k, 1'b0, 1'b1, shiftrows(s, 1'b0) ^ k);
      check(s, k, 1'b1, 1'b1, shiftrows(s, 1'b1) ^ k);
      check(s, k, 1'b0, 1'b0, s ^ k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
