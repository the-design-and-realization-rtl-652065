// tb_counting_channel: self-checking test of one delay channel. For each
// delay it writes the four bytes over the data bus (WR0..WR3), loads the
// counter, raises the start trigger and counts the clock periods from the
// clock edge that samples the trigger to the rising edge of OUT; this must
// equal the delay (55 counts = 5.5 us at 10 MHz, as in the reference
// simulation of the counting logic). It also checks that a trigger before
// loading is ignored, that OUT stays low before the delay has run out, and
// that reset clears the channel.
`timescale 1ns/1ps
module tb_counting_channel;
  logic        clk = 1'b0;
  logic        rst, load, trig;
  logic [7:0]  d;
  logic [3:0]  wr;
  logic        out, armed, running;
  logic [31:0] latched, count;
  int checks = 0, failures = 0;

  counting_channel dut (.clk(clk), .rst(rst), .d(d), .wr(wr), .load(load),
                        .trig(trig), .out(out), .armed(armed), .running(running),
                        .latched(latched), .count(count));

  always #50 clk = ~clk;

  initial begin
    #50_000_000;
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

  task automatic write_delay(input logic [31:0] n);
    for (int b = 0; b < 4; b++) begin
      d = n[8*b +: 8]; wr = 4'(1 << b);
      @(negedge clk);
    end
    wr = '0; d = 8'($urandom);
    check(latched == n, $sformatf("latched %0d", n));
  endtask

  task automatic run(input logic [31:0] n);
    int cycles;
    write_delay(n);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(armed && !running && !out, "armed after load");
    repeat ($urandom_range(1, 5)) @(negedge clk);
    trig = 1'b1;            // sampled by the next rising edge
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
      if (cycles == 1) check(running, "running after trigger");
    end while (!out && cycles < 2_000_000);
    // the first negedge counted follows the edge that sampled the trigger
    check(cycles - 1 == ((n == 0) ? 1 : int'(n)),
          $sformatf("delay %0d: OUT after %0d clocks", n, cycles - 1));
    trig = 1'b0;
    repeat (5) @(negedge clk);
    check(out, "OUT held");
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(!out && !armed && latched == 0, "reset clears");
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; trig = 1'b0; d = '0; wr = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    // trigger before loading: ignored
    write_delay(32'd10);
    trig = 1'b1;
    repeat (30) @(negedge clk);
    check(!out && !running, "trigger before load ignored");
    trig = 1'b0;
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    run(32'd55);
    run(32'd1);
    run(32'd500);      // 50 us
    run(32'd1000);     // 100 us
    run(32'h0001_2345); // uses the upper bytes
    for (int i = 0; i < 4; i++) run(32'($urandom_range(2, 5000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
