// trigger_enable: the trigger input logic of one channel. It turns the start
// trigger into the counter's counting enable: once the channel is armed (its
// delay has been loaded into the counter), the first rising edge of `trig`
// sets `en`, which then stays high until reset, so the counter runs down to
// zero whatever the trigger does afterwards. A trigger that arrives before
// the channel is armed is ignored, and so is a trigger level that is already
// high when the channel comes out of reset: `en` needs a low-to-high change.
// `clr` (the channel's load strobe) drops `en` so that a reloaded channel
// waits for a new trigger; it does not disturb the edge detector, so a
// trigger that rises just after the load is still seen.
//
// Timing: `en` rises on the first clock edge that samples `trig` high after
// it was sampled low. `trig` is taken to be synchronous to the clock (it
// comes through the controller's input isolation); a synchronizer would add
// its own fixed latency to every delay. Reset is synchronous and active high.
// Producing a counting enable from the trigger follows the controller; the
// edge detection, the hold and the arming rule are this design's choices.
module trigger_enable (
  input  logic clk,
  input  logic rst,
  input  logic arm,
  input  logic clr,
  input  logic trig,
  output logic en
);

  logic trig_q;
  logic rise;

  assign rise = trig && !trig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_q <= 1'b1;
      en     <= 1'b0;
    end else begin
      trig_q <= trig;
      if (clr)              en <= 1'b0;
      else if (arm && rise) en <= 1'b1;
    end
  end

endmodule
