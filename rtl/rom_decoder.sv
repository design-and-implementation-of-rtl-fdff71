// ROM address decoder: turns the program-counter value into a one-hot enable,
// one line per ROM byte.
//
// Each output is an AND of all address bits, each taken true or complemented
// according to the byte's own address, as the design builds every unit from
// a NAND plus an inverter. Address bit 0 is the decoder's input A. Exactly
// one output is high for every input value. Purely combinational.
module rom_decoder #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic [ADDR_W-1:0]      addr,
  output logic [2**ADDR_W-1:0]   sel
);

  always_comb begin
    for (int u = 0; u < 2**ADDR_W; u++) begin
      logic hit;
      hit = 1'b1;
      for (int b = 0; b < ADDR_W; b++)
        hit &= ((u >> b) & 1) != 0 ? addr[b] : ~addr[b];
      sel[u] = hit;
    end
  end

endmodule
