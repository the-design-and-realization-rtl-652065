// tb_mtsc_top: end-to-end self-checking test of the complete 20-channel
// controller at its default parameters (4 modules x 5 channels, 32-bit
// delays, 10 MHz clock, 5 ms output pulses). One complete operation:
//   - a start trigger before any channel is loaded must do nothing;
//   - each module's bus writes a different delay into each of its five
//     channels (among them 55 counts = 5.5 us), reads them back, and loads
//     them, two modules with the load-all command and two channel by channel;
//   - the common trigger is raised, dropped and raised again while counting
//     (the second edge must not restart anything);
//   - every delayed output must rise exactly its delay after the edge that
//     sampled the trigger, its 5 ms pulse must start one clock later and last
//     50,000 clocks, and each module's interrupt must come one clock after
//     its last output;
//   - a soft reset of one module must clear it and leave the others alone.
// Each of these mechanisms is counted, and one that never happened counts as
// a failure.
`timescale 1ns/1ps
module tb_mtsc_top;
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
  int cyc = 0;
  int n_byte_write = 0, n_readback = 0, n_load_one = 0, n_load_all = 0;
  int n_ignored_trig = 0, n_retrig = 0, n_delay = 0, n_pulse = 0;
  int n_irq = 0, n_soft_reset = 0;

  mtsc_top dut (.clk(clk), .rst(rst), .trig(trig), .mod_rst(mod_rst),
                .bus_addr(bus_addr), .bus_data(bus_data), .bus_wr(bus_wr),
                .delay_out(delay_out), .pulse_out(pulse_out),
                .bus_rdata(bus_rdata), .ch_armed(ch_armed),
                .ch_running(ch_running), .done_irq(done_irq));

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
      $display("FAIL %s", what);
    end
  endtask

  task automatic bus_write(input int m, input logic [4:0] a, input logic [7:0] v);
    bus_addr[m] = a; bus_data[m] = v; bus_wr[m] = 1'b1;
    @(negedge clk);
    bus_wr[m] = 1'b0; bus_data[m] = 8'($urandom);
  endtask

  logic [31:0] dly [N];
  int rise_d [N], rise_p [N], fall_p [N], irq_at [NM];

  initial begin
    int t_trig, last;
    rst = 1'b1; trig = 1'b0; mod_rst = '0; bus_wr = '0;
    bus_addr = '0; bus_data = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // trigger with nothing loaded
    trig = 1'b1;
    repeat (20) @(negedge clk);
    trig = 1'b0;
    check(ch_running == '0 && delay_out == '0 && pulse_out == '0,
          "unloaded channels ignore the trigger");
    if (ch_running == '0) n_ignored_trig++;

    // program the delays
    for (int i = 0; i < N; i++) dly[i] = 32'(40 + 97 * i + (i % 3) * 13);
    dly[0]  = 32'd55;     // 5.5 us
    dly[7]  = 32'd500;    // 50 us
    dly[13] = 32'd1000;   // 100 us
    dly[19] = 32'd1;
    for (int m = 0; m < NM; m++)
      for (int c = 0; c < NC; c++)
        for (int b = 0; b < 4; b++) begin
          bus_write(m, 5'(4 * c + b), dly[m*NC + c][8*b +: 8]);
          n_byte_write++;
        end
    for (int m = 0; m < NM; m++)
      for (int c = 0; c < NC; c++)
        for (int b = 0; b < 4; b++) begin
          bus_addr[m] = 5'(4 * c + b);
          #1;
          check(bus_rdata[m] == dly[m*NC + c][8*b +: 8], "read back");
          n_readback++;
        end
    @(negedge clk);
    for (int m = 0; m < NM; m++) begin
      if (m < 2) begin
        bus_write(m, LOAD_ALL, 8'h00);
        n_load_all++;
      end else begin
        for (int c = 0; c < NC; c++) begin
          bus_write(m, LOAD_BASE + 5'(c), 8'h00);
          n_load_one++;
        end
      end
    end
    check(ch_armed == '1 && ch_running == '0, "all channels armed, none running");

    // the operation
    for (int i = 0; i < N; i++) begin rise_d[i] = -1; rise_p[i] = -1; fall_p[i] = -1; end
    for (int m = 0; m < NM; m++) irq_at[m] = -1;
    last = 0;
    for (int i = 0; i < N; i++) if (int'(dly[i]) > last) last = int'(dly[i]);
    trig = 1'b1;
    t_trig = cyc + 1;
    while (cyc < t_trig + last + PULSE_CYCLES + 10) begin
      @(negedge clk);
      if (cyc == t_trig + 30) trig = 1'b0;
      if (cyc == t_trig + 35) begin
        trig = 1'b1;       // second edge while counting
        n_retrig++;
      end
      for (int i = 0; i < N; i++) begin
        if (delay_out[i] && rise_d[i] < 0) rise_d[i] = cyc;
        if (pulse_out[i] && rise_p[i] < 0) rise_p[i] = cyc;
        if (!pulse_out[i] && rise_p[i] >= 0 && fall_p[i] < 0) fall_p[i] = cyc;
      end
      for (int m = 0; m < NM; m++) if (done_irq[m] && irq_at[m] < 0) irq_at[m] = cyc;
    end
    trig = 1'b0;

    for (int i = 0; i < N; i++) begin
      check(rise_d[i] - t_trig == int'(dly[i]),
            $sformatf("ch%0d delay %0d measured %0d", i, dly[i], rise_d[i] - t_trig));
      if (rise_d[i] - t_trig == int'(dly[i])) n_delay++;
      check(rise_p[i] == rise_d[i] + 1, $sformatf("ch%0d pulse start", i));
      check(fall_p[i] - rise_p[i] == PULSE_CYCLES,
            $sformatf("ch%0d pulse width %0d", i, fall_p[i] - rise_p[i]));
      if (fall_p[i] - rise_p[i] == PULSE_CYCLES) n_pulse++;
    end
    for (int m = 0; m < NM; m++) begin
      int lm = 0;
      for (int c = 0; c < NC; c++) if (rise_d[m*NC + c] > lm) lm = rise_d[m*NC + c];
      check(irq_at[m] == lm + 1, $sformatf("module %0d interrupt", m));
      if (irq_at[m] == lm + 1) n_irq++;
    end

    // soft reset of module 1 only
    mod_rst[1] = 1'b1;
    @(negedge clk);
    mod_rst[1] = 1'b0;
    check(ch_armed[NC +: NC] == '0 && delay_out[NC +: NC] == '0 && !done_irq[1],
          "module 1 cleared");
    check(ch_armed[0 +: NC] == '1 && delay_out[0 +: NC] == '1 && done_irq[0] &&
          done_irq[2] && done_irq[3], "other modules kept");
    if (ch_armed[NC +: NC] == '0) n_soft_reset++;

    $display("mechanisms: byte_write=%0d readback=%0d load_one=%0d load_all=%0d ignored_trigger=%0d retrigger=%0d delay=%0d pulse=%0d irq=%0d soft_reset=%0d",
             n_byte_write, n_readback, n_load_one, n_load_all, n_ignored_trig,
             n_retrig, n_delay, n_pulse, n_irq, n_soft_reset);
    begin
      int seen [10];
      seen = '{n_byte_write, n_readback, n_load_one, n_load_all, n_ignored_trig,
               n_retrig, n_delay, n_pulse, n_irq, n_soft_reset};
      foreach (seen[k]) check(seen[k] > 0, $sformatf("mechanism %0d never happened", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
