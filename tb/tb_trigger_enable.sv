// tb_trigger_enable: self-checking test of the trigger input logic. Checks
// that a trigger is ignored while the channel is not armed, that a trigger
// level already high at reset or at arming does not enable, that the first
// rising edge after arming sets the enable on the very next clock edge, and
// that the enable then holds through further trigger activity until reset,
// and that the clear input drops it without hiding a trigger that follows.
`timescale 1ns/1ps
module tb_trigger_enable;
  logic clk = 1'b0;
  logic rst, arm, clr, trig, en;
  int checks = 0, failures = 0;

  trigger_enable dut (.clk(clk), .rst(rst), 
                      .arm(arm), .clr(clr), .trig(trig), .en(en));

  always #50 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1'b1; arm = 1'b0; clr = 1'b0; trig = 1'b1;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(!en, "trigger high through reset does not enable");
    arm = 1'b1;
    repeat (3) @(negedge clk);
    check(!en, "level without edge does not enable");
    trig = 1'b0; arm = 1'b0;
    @(negedge clk);
    trig = 1'b1;
    @(negedge clk);
    check(!en, "edge while not armed ignored");
    trig = 1'b0;
    @(negedge clk);
    arm = 1'b1;
    repeat (2) @(negedge clk);
    check(!en, "armed, no trigger");
    trig = 1'b1;
    @(posedge clk); #1;
    check(en, "enable on the edge sampling the trigger");
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      trig = 1'($urandom);
      arm  = 1'($urandom);
      check(en, "enable held");
    end
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0; trig = 1'b0; arm = 1'b1;
    check(!en, "reset clears");
    @(negedge clk);
    trig = 1'b1;
    @(negedge clk);
    check(en, "second operation");
    // clear drops the enable; a trigger rising right after it is still seen
    trig = 1'b0; clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(!en, "clear drops enable");
    trig = 1'b1;
    @(negedge clk);
    check(en, "edge right after clear seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
