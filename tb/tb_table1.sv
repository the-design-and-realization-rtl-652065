// tb_table1: runs the laboratory delay test of the controller on module 0 of
// the full-size design: two rounds of five channels with the delays
//   round 1: 50, 100, 500, 1,000 and 25,000 us
//   round 2: 1,000, 2,000, 5,000, 50,000 and 1,000,000 us
// followed by one channel set to the top of the delay range, 10 s
// (100,000,000 counts). The delay of every channel is measured from the
// clock edge that samples the start trigger to the rising edge of its
// delayed output, in clock periods of 100 ns, and must equal the set value
// exactly (the measured laboratory deviations of 0.1..1.5 us come from
// cabling and drivers outside this logic). Each output's 5 ms pulse is
// checked as well.
`timescale 1ns/1ps
module tb_table1;
  import mtsc_pkg::*;
  localparam int NM = MODULES, NC = CHANNELS, N = MODULES * CHANNELS;

  logic                      clk = 1'b0;
  logic                      rst, trig;
  logic [NM-1:0]             mod_rst, bus_wr;
  logic [NM-1:0][ADDR_W-1:0] bus_addr;
  logic [NM-1:0][DATA_W-1:0] bus_data, bus_rdata;
  logic [N-1:0]              delay_out, pulse_out, ch_armed, ch_running;
  logic [NM-1:0]             done_irq;

  int checks = 0, failures = 0;
  longint cyc = 0;

  mtsc_top dut (.clk(clk), .rst(rst), .trig(trig), .mod_rst(mod_rst),
                .bus_addr(bus_addr), .bus_data(bus_data), .bus_wr(bus_wr),
                .delay_out(delay_out), .pulse_out(pulse_out),
                .bus_rdata(bus_rdata), .ch_armed(ch_armed),
                .ch_running(ch_running), .done_irq(done_irq));

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #12_000_000_000;
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
    bus_addr[0] = a; bus_data[0] = v; bus_wr[0] = 1'b1;
    @(negedge clk);
    bus_wr[0] = 1'b0;
  endtask

  // delays in units of 0.1 us; a channel set to 0 is left unloaded
  task automatic round(input longint us10 [NC]);
    longint t_trig, rise [NC], prise [NC], pfall [NC];
    for (int c = 0; c < NC; c++)
      if (us10[c] != 0)
        for (int b = 0; b < 4; b++) bus_write(5'(4 * c + b), us10[c][8*b +: 8]);
    for (int c = 0; c < NC; c++)
      if (us10[c] != 0) bus_write(LOAD_BASE + 5'(c), 8'h00);
    for (int c = 0; c < NC; c++) begin rise[c] = -1; prise[c] = -1; pfall[c] = -1; end
    trig = 1'b1;
    t_trig = cyc + 1;
    do begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        if (delay_out[c] && rise[c] < 0) rise[c] = cyc;
        if (pulse_out[c] && prise[c] < 0) prise[c] = cyc;
        if (!pulse_out[c] && prise[c] >= 0 && pfall[c] < 0) pfall[c] = cyc;
      end
    end while (!done_irq[0] || pulse_out[NC-1:0] != '0);
    trig = 1'b0;
    for (int c = 0; c < NC; c++)
      if (us10[c] != 0) begin
        check(rise[c] - t_trig == us10[c],
              $sformatf("channel %0d: set %0d.%0d us, measured %0d.%0d us", c + 1,
                        us10[c] / 10, us10[c] % 10, (rise[c] - t_trig) / 10,
                        (rise[c] - t_trig) % 10));
        check(pfall[c] - prise[c] == PULSE_CYCLES, "5 ms pulse");
        $display("channel %0d: set %0d us, measured %0d.%0d us", c + 1, us10[c] / 10,
                 (rise[c] - t_trig) / 10, (rise[c] - t_trig) % 10);
      end
    mod_rst[0] = 1'b1;
    @(negedge clk);
    mod_rst[0] = 1'b0;
  endtask

  initial begin
    rst = 1'b1; trig = 1'b0; mod_rst = '0; bus_wr = '0;
    bus_addr = '0; bus_data = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    round('{500, 1000, 5000, 10000, 250000});
    round('{10000, 20000, 50000, 500000, 10000000});
    round('{100000000, 0, 0, 0, 0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
