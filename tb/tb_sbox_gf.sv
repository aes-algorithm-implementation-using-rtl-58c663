// tb_sbox_gf: exhaustive check of the composite-field (GSBOX) S-box.
//
// Every one of the 256 input bytes is applied in forward and in inverse mode
// and the output compared with the reference S-box of aes_ref_pkg, which is
// built independently from exponent/logarithm tables. A few FIPS-197 table
// entries are also checked as literal constants. The block is combinational;
// a free-running clock only paces the stimulus and the watchdog.
module tb_sbox_gf;
  import aes_ref_pkg::*;

  logic       clk = 1'b0;
  logic [7:0] din;
  logic       inv;
  logic [7:0] dout;
  int         checks = 0;
  int         failures = 0;

  sbox_gf dut (.din(din), .inv(inv), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(logic [7:0] x, logic i, logic [7:0] exp);
    din = x;
    inv = i;
    @(posedge clk);
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL in=%02h inv=%0d got=%02h exp=%02h", x, i, dout, exp);
    end
  endtask

  initial begin
    check(8'h00, 1'b0, 8'h63);
    check(8'h53, 1'b0, 8'hed);
    check(8'hff, 1'b0, 8'h16);
    check(8'h63, 1'b1, 8'h00);
    check(8'h16, 1'b1, 8'hff);
    for (int x = 0; x < 256; x++) begin
      check(8'(x), 1'b0, sbox(8'(x)));
      check(8'(x), 1'b1, inv_sbox(8'(x)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
