// Instruction register: holds the fetched ROM word through the execute phase.
//
// Loads d at a CPU clock (clk with step high) when load is high, otherwise
// holds. Reset clears it to zero, which decodes as no operation. The design
// names this register; holding the whole 8-bit word, operand included, is
// this design's choice so that a jump target outlives the clearing of the PC.
module instr_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= '0;
    else if (step && load)
      q <= d;
  end

endmodule
