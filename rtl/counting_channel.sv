// counting_channel: one delay channel of a time sequence control module (the
// counting sequential logic). It chains three parts:
//   data_latch32     - four byte latches (WR0..WR3) collect the 32-bit delay
//                      from the microcontroller's 8-bit data bus;
//   preset_counter32 - `load` copies the latched delay into the down counter
//                      and arms the channel;
//   trigger_enable   - the first rising edge of the start trigger after
//                      arming enables counting.
// The counter then counts down to 0 at one step per clock and its terminal
// count drives `out` (OUT0 of the channel), whose rising edge is the moment
// the delayed trigger is issued. `out` stays high until the next load or
// reset; the pulse former after it sets the output pulse width.
//
// Timing: with delay N >= 1 loaded and the trigger first sampled high at
// clock edge k, `out` rises at edge k+N: at the 10 MHz counting clock a
// delay of 55 gives 5.5 us. Reset is synchronous and active high and clears
// the latch, the counter and the arming.
// The latch/counter/trigger structure follows the controller; the arming
// rule and the sticky output are this design's choices.
module counting_channel #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BYTES  = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [DATA_W-1:0]         d,      // data bus
  input  logic [BYTES-1:0]          wr,     // byte strobes WR0..WR3
  input  logic                      load,   // latch -> counter
  input  logic                      trig,   // start trigger
  output logic                      out,    // delayed trigger (OUT0)
  output logic                      armed,  // delay loaded, waiting/counting
  output logic                      running,// counting enabled
  output logic [BYTES*DATA_W-1:0]   latched,// delay value held in the latch
  output logic [BYTES*DATA_W-1:0]   count   // counter contents, for tests
);

  localparam int unsigned W = BYTES * DATA_W;

  data_latch32 #(.DATA_W(DATA_W), .BYTES(BYTES)) u_latch (
    .clk (clk),
    .rst (rst),
    .d   (d),
    .wr  (wr),
    .q   (latched)
  );

  always_ff @(posedge clk) begin
    if (rst)       armed <= 1'b0;
    else if (load) armed <= 1'b1;
  end

  trigger_enable u_trig (
    .clk  (clk),
    .rst  (rst),
    .arm  (armed),
    .clr  (load),
    .trig (trig),
    .en   (running)
  );

  preset_counter32 #(.WIDTH(W)) u_cnt (
    .clk   (clk),
    .rst   (rst),
    .load  (load),
    .din   (latched),
    .en    (running),
    .count (count),
    .cout  (out)
  );

  // OUT only ever follows a triggered count.
  a_out_after_trigger: assert property (@(posedge clk) disable iff (rst)
    out |-> running)
    else $error("OUT high without a counting enable");

endmodule
