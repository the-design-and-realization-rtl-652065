// mtsc_top: the multiplex time sequence controller. It issues up to
// MODULES*CHANNELS (4 x 5 = 20) delayed trigger pulses after one common
// start trigger, each channel with its own delay of 0..10 s in 0.1 us steps
// (32-bit count of the 10 MHz clock).
//
// Each of the MODULES time sequence control modules has its own write bus
// from its slave microcontroller (bus_addr/bus_data/bus_wr, see mtsc_pkg for
// the address map), its own soft reset `mod_rst` and its own "delay
// finished" interrupt `done_irq`; `bus_rdata` reads back the latched delay
// bytes, and `ch_armed`/`ch_running` show which channels hold a delay and
// which are counting. The start trigger `trig` goes to every
// channel. Every channel's delayed trigger `delay_out` (rising edge = the
// output moment, held high until reload or reset) feeds a mono-stable
// pulse former that gives the 5 ms output pulse `pulse_out`; level shifting
// to the 12 V drivers and the input/output isolation are outside this RTL.
// Channel numbering: channel c of module m is bit m*CHANNELS + c.
//
// Timing: delay_out of a channel loaded with N >= 1 rises N clock periods
// after the clock edge that first samples `trig` high; pulse_out follows one
// clock later and lasts PULSE_CYCLES clocks. Synchronous, active-high reset.
// Four modules of five channels, the common trigger and the 5 ms one-shot
// follow the controller; the bus and the interrupt rule are this design's.
module mtsc_top
  import mtsc_pkg::*;
#(
  parameter int unsigned NMOD         = MODULES,
  parameter int unsigned NCH          = CHANNELS,
  parameter int unsigned PULSE_LEN    = PULSE_CYCLES
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          trig,
  input  logic [NMOD-1:0]               mod_rst,
  input  logic [NMOD-1:0][ADDR_W-1:0]   bus_addr,
  input  logic [NMOD-1:0][DATA_W-1:0]   bus_data,
  input  logic [NMOD-1:0]               bus_wr,
  output logic [NMOD*NCH-1:0]           delay_out,
  output logic [NMOD*NCH-1:0]           pulse_out,
  output logic [NMOD-1:0][DATA_W-1:0]   bus_rdata,
  output logic [NMOD*NCH-1:0]           ch_armed,
  output logic [NMOD*NCH-1:0]           ch_running,
  output logic [NMOD-1:0]               done_irq
);

  for (genvar m = 0; m < int'(NMOD); m++) begin : g_mod
    timing_module #(.NCH(NCH)) u_mod (
      .clk      (clk),
      .rst      (rst),
      .mod_rst  (mod_rst[m]),
      .addr     (bus_addr[m]),
      .data     (bus_data[m]),
      .wr       (bus_wr[m]),
      .trig     (trig),
      .out      (delay_out[m*NCH +: NCH]),
      .armed    (ch_armed[m*NCH +: NCH]),
      .running  (ch_running[m*NCH +: NCH]),
      .rdata    (bus_rdata[m]),
      .done_irq (done_irq[m])
    );
  end

  for (genvar i = 0; i < int'(NMOD * NCH); i++) begin : g_pulse
    pulse_former #(.PULSE_CYCLES(PULSE_LEN)) u_pf (
      .clk   (clk),
      .rst   (rst),
      .in    (delay_out[i]),
      .pulse (pulse_out[i])
    );
  end

endmodule
