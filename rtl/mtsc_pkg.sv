// mtsc_pkg: constants shared by the multiplex time sequence controller.
//
// The controller has MODULES time sequence control modules of CHANNELS delay
// channels each. A channel holds a DELAY_W-bit delay, counted in periods of
// the 10 MHz counting clock (one count = 0.1 us), so 0..10 s needs
// 100,000,000 counts and fits in 32 bits. The delay is written one byte at a
// time over the module's 8-bit data bus.
//
// Bus address map of one module (ADDR_W = 5 bits), this design's own choice:
//   addr[4:2] = channel 0..4, addr[1:0] = byte 0..3  -> write byte of the
//                                                      channel's delay latch
//                                                      (byte 0 = LSB, WR0)
//   LOAD_BASE + c (24..28)                           -> copy latch of channel
//                                                      c into its counter
//   LOAD_ALL (31)                                    -> copy all latches
package mtsc_pkg;

  localparam int unsigned MODULES      = 4;      // modules per controller
  localparam int unsigned CHANNELS     = 5;      // delay channels per module
  localparam int unsigned DATA_W       = 8;      // microcontroller data bus
  localparam int unsigned DELAY_W      = 32;     // delay latch / counter width
  localparam int unsigned BYTES        = DELAY_W / DATA_W;
  localparam int unsigned ADDR_W       = 5;
  localparam int unsigned CLK_HZ       = 10_000_000;   // counting clock
  localparam int unsigned PULSE_CYCLES = CLK_HZ / 200; // 5 ms output pulse

  localparam logic [ADDR_W-1:0] LOAD_BASE = 5'd24;
  localparam logic [ADDR_W-1:0] LOAD_ALL  = 5'd31;

endpackage
