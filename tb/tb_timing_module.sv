// tb_timing_module: self-checking test of one five-channel time sequence
// control module driven the way its slave microcontroller drives it. It
// writes a different delay into each channel over the 8-bit bus, reads
// every byte back, loads the counters (one channel by command, the rest
// with the load-all command), raises the common trigger and checks that
// each channel's output rises exactly its delay in clock periods after the
// trigger is sampled, that the "delay finished" interrupt comes one clock
// after the last output and not before, and that the soft reset clears
// the module.
`timescale 1ns/1ps
module tb_timing_module;
  import mtsc_pkg::*;
  localparam int NCH = 5;
  logic             clk = 1'b0;
  logic             rst, mod_rst, wr, trig;
  logic [4:0]       addr;
  logic [7:0]       data, rdata;
  logic [NCH-1:0]   out, armed, running;
  logic             done_irq;
  int checks = 0, failures = 0;
  int cyc = 0;

  timing_module dut (.clk(clk), .rst(rst), .mod_rst(mod_rst), .addr(addr),
                     .data(data), .wr(wr), .trig(trig), .out(out),
                     .armed(armed), .running(running), .rdata(rdata),
                     .done_irq(done_irq));

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100_000_000;
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

  task automatic bus_write(input logic [4:0] a, input logic [7:0] v);
    addr = a; data = v; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0; data = 8'($urandom); addr = 5'($urandom);
  endtask

  task automatic operation(input logic [31:0] dly [NCH]);
    int rise [NCH];
    int t_trig, last, irq_cyc;
    for (int c = 0; c < NCH; c++)
      for (int b = 0; b < 4; b++) bus_write(5'(4 * c + b), dly[c][8*b +: 8]);
    for (int c = 0; c < NCH; c++)
      for (int b = 0; b < 4; b++) begin
        addr = 5'(4 * c + b);
        #1;
        check(rdata == dly[c][8*b +: 8], $sformatf("read back ch%0d byte%0d", c, b));
      end
    bus_write(LOAD_BASE + 5'd2, 8'h00);
    check(armed == 5'b00100, "single-channel load");
    bus_write(LOAD_ALL, 8'h00);
    check(armed == 5'b11111, "load all");
    repeat (3) @(negedge clk);
    check(out == '0 && !done_irq, "idle before trigger");
    trig = 1'b1;
    t_trig = cyc + 1;          // edge that samples the trigger
    for (int c = 0; c < NCH; c++) rise[c] = -1;
    irq_cyc = -1;
    last = 0;
    for (int c = 0; c < NCH; c++) if (int'(dly[c]) > last) last = int'(dly[c]);
    while (irq_cyc < 0 && cyc < t_trig + last + 20) begin
      @(negedge clk);
      if (cyc == t_trig + 3) trig = 1'b0;
      for (int c = 0; c < NCH; c++) if (out[c] && rise[c] < 0) rise[c] = cyc;
      if (done_irq) irq_cyc = cyc;
    end
    for (int c = 0; c < NCH; c++)
      check(rise[c] - t_trig == int'(dly[c]),
            $sformatf("ch%0d delay %0d measured %0d", c, dly[c], rise[c] - t_trig));
    check(irq_cyc == t_trig + last + 1, $sformatf("interrupt at %0d, last output %0d",
          irq_cyc - t_trig, last));
    mod_rst = 1'b1;
    @(negedge clk);
    mod_rst = 1'b0;
    check(out == '0 && armed == '0 && !done_irq, "soft reset clears module");
  endtask

  initial begin
    logic [31:0] dly [NCH];
    rst = 1'b1; mod_rst = 1'b0; wr = 1'b0; trig = 1'b0; addr = '0; data = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    dly = '{32'd55, 32'd100, 32'd7, 32'd300, 32'd299};
    operation(dly);
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < NCH; c++) dly[c] = 32'($urandom_range(1, 4000));
      operation(dly);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
