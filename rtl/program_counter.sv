// Program counter: a WIDTH-bit up counter whose direct CLEAR and PRESET
// inputs implement the jump.
//
// The register r advances by one at a CPU clock (clk with step high) when
// inc is high. CLEAR and PRESET act on the output at once, as the direct
// reset/set pins of a D flip-flop do: while clr is high q reads zero, and
// every bit of set_mask that is high forces that bit of q to one. At the next
// CPU clock r takes whatever q then shows. A jump is therefore one cycle
// with clr high (q becomes 0) followed by one with set_mask equal to the
// target (q becomes the target), as the design prescribes. The design's
// counter is an asynchronous ripple counter; this one is synchronous with the
// same count sequence. Reset (rst_n low) sets it to zero.
module program_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step,
  input  logic             inc,
  input  logic             clr,
  input  logic [WIDTH-1:0] set_mask,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] r;

  always_comb q = (clr ? '0 : r) | set_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      r <= '0;
    else if (step)
      r <= inc ? q + 1'b1 : q;
  end

endmodule
