// Accumulator (register A): a WIDTH-bit register in parallel-load mode,
// shown on LEDs and fed back to the ALU.
//
// At a CPU clock (clk with step high): aclr clears it; otherwise load_rom
// loads the ROM operand (LDA); otherwise load_alu loads the ALU result;
// otherwise it holds. The design clears the register through its active-low
// master reset driven by an inverted ACLR; here ACLR is active high and
// takes effect at the clock edge. The order of priority and the select
// between the two data sources are this design's choice. Reset sets zero.
module accumulator #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             aclr,
  input  logic             load_rom,
  input  logic             load_alu,
  input  logic [WIDTH-1:0] d_rom,
  input  logic [WIDTH-1:0] d_alu,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (step) begin
      if (aclr)          q <= '0;
      else if (load_rom) q <= d_rom;
      else if (load_alu) q <= d_alu;
    end
  end

endmodule
