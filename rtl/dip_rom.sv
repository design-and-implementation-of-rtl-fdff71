// Switch-programmed ROM of DEPTH bytes of WIDTH bits.
//
// Every byte is a row of WIDTH data switches, each bit set by one DIP switch
// (the dip input). A one-hot enable from the ROM decoder selects a byte;
// the corresponding bits of all bytes share one output line each, so the bus
// carries the OR of every enabled byte and reads zero when none is enabled.
// Depth 16 and width 8 follow the design; presenting the switches as an input
// port is this design's choice. Purely combinational.
module dip_rom #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic [DEPTH-1:0]            sel,
  input  logic [DEPTH-1:0][WIDTH-1:0] dip,
  output logic [WIDTH-1:0]            data
);

  always_comb begin
    data = '0;
    for (int i = 0; i < DEPTH; i++)
      if (sel[i]) data |= dip[i];
  end

endmodule
