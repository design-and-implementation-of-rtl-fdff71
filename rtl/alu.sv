// Add/subtract ALU: a ripple-carry adder of WIDTH full adders.
//
// Subtraction uses two's complement: every bit of B passes through an XOR
// with the subtract control, and the same control is the carry into the
// least significant full adder, so y = a + ~b + 1 = a - b. With sub low B is
// passed unchanged and y = a + b. This structure, and the width of four, follow
// the design; bringing the final carry out as cout is this design's addition.
// Purely combinational.
module alu #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH-1:0] b_x;

  always_comb begin
    logic c;             // carry rippling from bit i to bit i+1
    b_x = b ^ {WIDTH{sub}};
    c   = sub;
    for (int i = 0; i < WIDTH; i++) begin
      y[i] = a[i] ^ b_x[i] ^ c;
      c    = (a[i] & b_x[i]) | (c & (a[i] ^ b_x[i]));
    end
    cout = c;
  end

endmodule
