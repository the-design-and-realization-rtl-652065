// tb_preset_counter32: self-checking test of the 32-bit preset down counter.
// For a set of preset values it loads the counter, raises the enable and
// counts the clock periods until COUT rises, which must equal the preset
// (one period for a preset of 0). It also checks that the counter holds
// while disabled, stops at 0 with COUT held, that a load clears COUT, and
// that a value above 2^31 loads and counts.
`timescale 1ns/1ps
module tb_preset_counter32;
  logic        clk = 1'b0;
  logic        rst, load, en;
  logic [31:0] din, count;
  logic        cout;
  int checks = 0, failures = 0;

  preset_counter32 dut (.clk(clk), .rst(rst), .load(load), .din(din),
                        .en(en), .count(count), .cout(cout));

  always #50 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (count=%0d cout=%0b)", what, count, cout);
    end
  endtask

  task automatic run(input logic [31:0] n);
    int cycles;
    load = 1'b1; din = n;
    @(negedge clk);
    load = 1'b0; din = 32'($urandom);
    check(count == n && !cout, "load value");
    // held while disabled
    repeat (3) @(negedge clk);
    check(count == n && !cout, "hold while disabled");
    en = 1'b1;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!cout && cycles < 100_000);
    check(cycles == ((n == 0) ? 1 : int'(n)), $sformatf("delay %0d took %0d", n, cycles));
    check(count == 0, "count at zero");
    repeat (3) @(negedge clk);
    check(cout && count == 0, "stays at zero with cout");
    en = 1'b0;
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; en = 1'b0; din = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    check(count == 0 && !cout, "reset");
    run(32'd55);
    run(32'd1);
    run(32'd0);
    run(32'd2);
    run(32'd500);
    for (int i = 0; i < 5; i++) run(32'($urandom_range(3, 3000)));
    // big preset: check the load and a few steps only
    load = 1'b1; din = 32'hF000_0003;
    @(negedge clk);
    load = 1'b0; en = 1'b1;
    repeat (5) @(negedge clk);
    check(count == 32'hEFFF_FFFE && !cout, "wide count down");
    // load during count restarts it and clears cout
    load = 1'b1; din = 32'd4;
    @(negedge clk);
    load = 1'b0;
    check(count == 4 && !cout, "reload");
    repeat (4) @(negedge clk);
    check(cout, "reload expires");
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(count == 0 && !cout, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
