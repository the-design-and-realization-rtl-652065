// preset_counter32: the presettable down counter of one channel (U5 of the
// counting logic). `load` copies the preset value `din` into the counter.
// While `en` is high the counter counts down by one per clock until it
// reaches 0, where it stops. `cout` is the terminal-count output: it rises
// on the clock edge on which the counter, while enabled, reaches (or already
// is at) 0, and stays high until the next load or reset.
//
// Timing: with the counter loaded with N >= 1 and `en` first seen high at
// clock edge k, the count steps at edges k+1 .. k+N and `cout` rises at edge
// k+N, i.e. N clock periods after the enable edge. For N = 0 it rises at
// edge k+1. Reset is synchronous and active high.
// Counting down to 0 and signalling on COUT follows the controller's
// counting logic; the registered COUT and the stop at 0 are this design's
// choices.
module preset_counter32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic             cout
);

  logic [WIDTH-1:0] count_next;

  always_comb begin
    count_next = count;
    if (en && count != '0) count_next = count - WIDTH'(1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      cout  <= 1'b0;
    end else if (load) begin
      count <= din;
      cout  <= 1'b0;
    end else begin
      count <= count_next;
      if (en && count_next == '0) cout <= 1'b1;
    end
  end

endmodule
