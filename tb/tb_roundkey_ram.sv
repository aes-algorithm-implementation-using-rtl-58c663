// tb_roundkey_ram: checks the round-key memory.
//
// All 60 words are written one per clock with random data kept in a
// scoreboard, then every 128-bit round key is read back, one clock after
// its round number is applied, and compared;
// a second pass overwrites some words and checks that only they changed.
module tb_roundkey_ram;
  logic         clk = 1'b0;
  logic         we;
  logic [5:0]   waddr;
  logic [31:0]  wdata;
  logic [3:0]   raddr_round;
  logic [127:0] rdata;
  logic [31:0]  model [60];
  int           checks = 0;
  int           failures = 0;

  roundkey_ram #(.WORDS(60)) dut (.*);

  always #5 clk = ~clk;

  task automatic write(int a, logic [31:0] d);
    we = 1'b1; waddr = 6'(a); wdata = d;
    @(posedge clk);
    #1 we = 1'b0;
    model[a] = d;
  endtask

  task automatic check_all();
    for (int r = 0; r < 15; r++) begin
      raddr_round = 4'(r);
      @(posedge clk);   // registered read
      #1;
      checks++;
      if (rdata !== {model[4*r], model[4*r+1], model[4*r+2], model[4*r+3]}) begin
        failures++;
        $display("FAIL round %0d got %032h", r, rdata);
      end
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr_round = '0;
    @(posedge clk);
    #1;
    for (int a = 0; a < 60; a++) write(a, $urandom);
    check_all();
    for (int n = 0; n < 20; n++) write(int'($urandom_range(0, 59)), $urandom);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
