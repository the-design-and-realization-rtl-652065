// tb_pulse_former: self-checking test of the 5 ms one-shot at its default
// width (50,000 clock periods of 10 MHz). Checks that the pulse starts on
// the clock edge that first samples the input high, lasts exactly 5 ms, ignores input edges while
// high, ignores an input already high at reset, and fires again afterwards.
`timescale 1ns/1ps
module tb_pulse_former;
  logic clk = 1'b0;
  logic rst, in, pulse;
  int checks = 0, failures = 0;

  pulse_former dut (.clk(clk), .rst(rst), .in(in), .pulse(pulse));

  always #50 clk = ~clk;

  initial begin
    #30_000_000;
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

  task automatic fire_and_measure(input bit retrigger);
    realtime t_edge, t_rise, t_fall;
    in = 1'b1;
    t_edge = $realtime + 50.0;      // next rising clock edge samples it
    @(posedge pulse) t_rise = $realtime;
    if (retrigger) begin
      repeat (100) @(negedge clk);
      in = 1'b0;
      repeat (100) @(negedge clk);
      in = 1'b1;
    end
    @(negedge pulse) t_fall = $realtime;
    check(t_rise == t_edge, $sformatf("start %0t after edge", t_rise - t_edge));
    check(t_fall - t_rise == 5.0e6, $sformatf("width %0t ns", t_fall - t_rise));
    @(negedge clk);
    in = 1'b0;
    repeat (3) @(negedge clk);
    check(!pulse, "low after pulse");
  endtask

  initial begin
    rst = 1'b1; in = 1'b1;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    check(!pulse, "input high at reset does not fire");
    in = 1'b0;
    @(negedge clk);
    fire_and_measure(1'b0);
    fire_and_measure(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
