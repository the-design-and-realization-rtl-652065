// address_decoder: the address decoding logic of a time sequence control
// module. It turns the slave microcontroller's address command and write
// strobe into one byte-write strobe per channel latch byte and one load
// strobe per channel counter.
//
// Address map (ADDR_W = 5), this design's own choice:
//   addr[4:2] = channel c < CHANNELS, addr[1:0] = byte b -> wr_byte[c][b]
//   LOAD_BASE + c                                       -> load[c]
//   LOAD_ALL                                            -> every load[c]
// Other addresses do nothing. Purely combinational: the strobes follow `wr`
// in the same clock cycle.
module address_decoder
  import mtsc_pkg::*;
#(
  parameter int unsigned NCH = CHANNELS
) (
  input  logic [ADDR_W-1:0]         addr,
  input  logic                      wr,
  output logic [NCH-1:0][BYTES-1:0] wr_byte,
  output logic [NCH-1:0]            load
);

  always_comb begin
    wr_byte = '0;
    load    = '0;
    if (wr) begin
      for (int c = 0; c < int'(NCH); c++) begin
        if (int'(addr[ADDR_W-1:2]) == c && c < int'(LOAD_BASE) / int'(BYTES))
          wr_byte[c][addr[1:0]] = 1'b1;
        if (addr == LOAD_ALL || int'(addr) == int'(LOAD_BASE) + c)
          load[c] = 1'b1;
      end
    end
  end

endmodule
