// tb_address_decoder: exhaustive self-checking test of the address decoder.
// For every address with and without the write strobe it compares the byte
// and load strobes with a table of expected strobes built from the address
// map: channel = addr/4, byte = addr%4 for addresses 0..19, load of channel
// addr-24 for 24..28, load of all channels at 31, nothing elsewhere.
`timescale 1ns/1ps
module tb_address_decoder;
  import mtsc_pkg::*;
  logic [4:0]       addr;
  logic             wr;
  logic [4:0][3:0]  wr_byte;
  logic [4:0]       load;
  int checks = 0, failures = 0;

  address_decoder dut (.addr(addr), .wr(wr), .wr_byte(wr_byte), .load(load));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2; w++) begin
      for (int a = 0; a < 32; a++) begin
        logic [19:0] exp_b;
        logic [4:0]  exp_l;
        exp_b = '0; exp_l = '0;
        if (w == 1) begin
          if (a < 20)               exp_b[a] = 1'b1;
          if (a >= 24 && a <= 28)   exp_l[a - 24] = 1'b1;
          if (a == 31)              exp_l = 5'b11111;
        end
        addr = 5'(a); wr = 1'(w);
        #10;
        checks++;
        if (wr_byte !== exp_b || load !== exp_l) begin
          failures++;
          $display("FAIL addr=%0d wr=%0d: bytes=%05h load=%05b expected %05h %05b",
                   a, w, wr_byte, load, exp_b, exp_l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
