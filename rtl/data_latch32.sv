// data_latch32: the delay value latch of one channel (U1..U4 of the counting
// logic). Four 8-bit registers form one 32-bit word; each is written from
// the microcontroller data bus `d` on the clock edge where its own strobe
// wr[i] (WR0..WR3) is high, so the microcontroller writes the delay one byte
// at a time, byte 0 being the least significant. `q` holds the assembled word
// and feeds the preset input of the channel's counter.
//
// Timing: a byte appears on `q` one clock after its strobe. Synchronous,
// active-high reset clears the word.
// Splitting the word into byte latches follows the counting logic of the
// controller; edge-triggered registers in place of transparent latches and
// the reset value of zero are this design's choices.
module data_latch32 #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BYTES  = 4
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [DATA_W-1:0]         d,
  input  logic [BYTES-1:0]          wr,
  output logic [BYTES*DATA_W-1:0]   q
);

  logic [BYTES-1:0][DATA_W-1:0] bytes_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      bytes_q <= '0;
    end else begin
      for (int i = 0; i < int'(BYTES); i++)
        if (wr[i]) bytes_q[i] <= d;
    end
  end

  assign q = bytes_q;

endmodule
