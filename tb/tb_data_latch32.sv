// tb_data_latch32: self-checking test of the 32-bit byte-written delay latch.
// Writes random bytes through random strobe patterns (including several
// strobes at once and none) and compares the word with a reference model
// kept as four separate bytes. Also checks reset clears the word.
`timescale 1ns/1ps
module tb_data_latch32;
  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  d;
  logic [3:0]  wr;
  logic [31:0] q;
  logic [7:0]  model [4];
  int checks = 0, failures = 0;

  data_latch32 dut (.clk(clk), .rst(rst), .d(d), .wr(wr), .q(q));

  always #50 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q();
    logic [31:0] exp;
    exp = {model[3], model[2], model[1], model[0]};
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL q=%08h expected %08h", q, exp);
    end
  endtask

  initial begin
    rst = 1'b1; d = '0; wr = '0;
    for (int i = 0; i < 4; i++) model[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    check_q();
    for (int n = 0; n < 400; n++) begin
      d  = 8'($urandom);
      wr = (n < 4) ? 4'(1 << n) : 4'($urandom);
      for (int i = 0; i < 4; i++) if (wr[i]) model[i] = d;
      @(negedge clk);
      wr = '0;
      d  = 8'($urandom);
      @(negedge clk);
      check_q();
    end
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4; i++) model[i] = '0;
    check_q();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
