// tb_mix_columns: checks MixColumns and InvMixColumns of one column.
//
// Known FIPS/textbook column examples are checked as literals, then 500
// random columns in each direction against the matrix product of
// aes_ref_pkg, and finally that InvMixColumns undoes MixColumns.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] col_in, col_out;
  logic        inv;
  int          checks = 0;
  int          failures = 0;

  mix_columns dut (.col_in(col_in), .inv(inv), .col_out(col_out));

  always #5 clk = ~clk;

  task automatic check(logic [31:0] c, logic i, logic [31:0] exp);
    col_in = c;
    inv    = i;
    @(posedge clk);
    checks++;
    if (col_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL in=%08h inv=%0d got=%08h exp=%08h", c, i, col_out, exp);
    end
  endtask

  initial begin
    logic [31:0] c, m;
    check(32'hdb135345, 1'b0, 32'h8e4da1bc);
    check(32'hf20a225c, 1'b0, 32'h9fdc589d);
    check(32'hd4d4d4d5, 1'b0, 32'hd5d5d7d6);
    check(32'h8e4da1bc, 1'b1, 32'hdb135345);
    for (int k = 0; k < 500; k++) begin
      c = $urandom;
      check(c, 1'b0, mixcol(c, 1'b0));
      check(c, 1'b1, mixcol(c, 1'b1));
      m = mixcol(c, 1'b0);
      check(m, 1'b1, c);
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
