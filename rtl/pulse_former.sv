// pulse_former: the mono-stable trigger in front of each output driver. A
// rising edge on `in` (the channel's delayed trigger) starts an output pulse
// of exactly PULSE_CYCLES clock periods; 50,000 periods of the 10 MHz clock
// give the controller's 5 ms pulse. It is not retriggerable: edges that come
// while the pulse is high are ignored.
//
// Timing: `pulse` rises on the first clock edge that samples `in` high; for
// a registered `in` that is one clock (0.1 us) after `in` rose. It falls
// PULSE_CYCLES edges later. Reset is synchronous
// and active high; `in` already high at reset does not fire.
// The 5 ms width follows the controller; building the one-shot as a digital
// counter on the counting clock, instead of an analog mono-stable, is this
// design's choice.
module pulse_former #(
  parameter int unsigned PULSE_CYCLES = 50_000
) (
  input  logic clk,
  input  logic rst,
  input  logic in,
  output logic pulse
);

  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);

  logic          in_q;
  logic [CW-1:0] remain;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q   <= 1'b1;
      remain <= '0;
      pulse  <= 1'b0;
    end else begin
      in_q <= in;
      if (remain != '0) begin
        remain <= remain - CW'(1);
        if (remain == CW'(1)) pulse <= 1'b0;
      end else if (in && !in_q) begin
        remain <= CW'(PULSE_CYCLES);
        pulse  <= 1'b1;
      end
    end
  end

endmodule
