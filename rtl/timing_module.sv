// timing_module: the FPGA logic of one time sequence control module, which
// serves NCH (5) delay channels. The module's slave microcontroller writes
// each channel's 32-bit delay over the 8-bit data bus, one byte per write,
// then issues a load command; the address decoder turns each bus write into
// the strobe of one latch byte or into the load strobes of the counters.
// After loading, all channels wait for the common start trigger and then
// each counts its own delay down independently, raising its bit of `out`
// when it expires.
//
// `done_irq` is the "delay finished" interrupt to the microcontroller: it is
// high while at least one channel is armed and every armed channel has
// fired. The microcontroller answers it by pulsing `mod_rst`, which returns
// the module to its empty state (as does the global `rst`).
//
// Interface: `addr`, `data`, `wr` form a synchronous write bus; one write
// per clock cycle in which `wr` is high. `rdata` reads back, without
// waiting, the latched delay byte that `addr` selects (0 elsewhere). Reset is synchronous, active high.
// Timing: each `out[c]` rises N_c clock periods after the clock edge that
// first samples `trig` high; `done_irq` follows the last `out` by one clock.
// The structure (decoder plus five latch/counter channels) follows the
// controller; the bus timing, address map and interrupt rule are this
// design's own.
module timing_module
  import mtsc_pkg::*;
#(
  parameter int unsigned NCH = CHANNELS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      mod_rst,
  input  logic [ADDR_W-1:0]         addr,
  input  logic [DATA_W-1:0]         data,
  input  logic                      wr,
  input  logic                      trig,
  output logic [NCH-1:0]            out,
  output logic [NCH-1:0]            armed,
  output logic [NCH-1:0]            running,
  output logic [DATA_W-1:0]         rdata,
  output logic                      done_irq
);

  logic                      rst_i;
  logic [NCH-1:0][BYTES-1:0] wr_byte;
  logic [NCH-1:0]            load;
  logic [NCH-1:0][DELAY_W-1:0] latched;
  logic [NCH-1:0][DELAY_W-1:0] count;
  logic [NCH-1:0][BYTES-1:0][DATA_W-1:0] latched_b;

  assign rst_i = rst || mod_rst;

  address_decoder #(.NCH(NCH)) u_dec (
    .addr    (addr),
    .wr      (wr),
    .wr_byte (wr_byte),
    .load    (load)
  );

  for (genvar c = 0; c < int'(NCH); c++) begin : g_ch
    counting_channel #(.DATA_W(DATA_W), .BYTES(BYTES)) u_ch (
      .clk     (clk),
      .rst     (rst_i),
      .d       (data),
      .wr      (wr_byte[c]),
      .load    (load[c]),
      .trig    (trig),
      .out     (out[c]),
      .armed   (armed[c]),
      .running (running[c]),
      .latched (latched[c]),
      .count   (count[c])
    );
  end

  // Read-back of the latched delays, for display and checking by the
  // microcontroller: combinational, the byte selected by `addr`.
  assign latched_b = latched;
  always_comb begin
    rdata = '0;
    for (int c = 0; c < int'(NCH); c++)
      if (int'(addr[ADDR_W-1:2]) == c) rdata = latched_b[c][addr[1:0]];
  end

  // The counter contents are not read back; the channel exposes them for
  // its own tests only.
  logic unused_count;
  assign unused_count = ^count;

  always_ff @(posedge clk) begin
    if (rst_i) done_irq <= 1'b0;
    else       done_irq <= (armed != '0) && ((armed & ~out) == '0);
  end

  // Bus rule: a write strobes at most one latch byte.
  a_one_byte_per_write: assert property (@(posedge clk) $onehot0(wr_byte))
    else $error("write strobed several latch bytes");
  // A channel can only fire once its delay has been loaded.
  a_fire_needs_load: assert property (@(posedge clk) disable iff (rst_i)
    (out & ~armed) == '0)
    else $error("channel fired without a loaded delay");

endmodule
