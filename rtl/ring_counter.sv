// One-bit ring counter: the single stage feeds its inverted output back to
// its input, so it alternates between the fetch phase (0) and the execute
// phase (1) at every CPU clock (clk with step high). Reset starts it in fetch.
// The design uses a one-bit ring counter to pace execution; reading its two
// states as fetch and execute is this design's choice.
module ring_counter
  import cpu8_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   step,
  output phase_e phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      phase <= PH_FETCH;
    else if (step)
      phase <= (phase == PH_FETCH) ? PH_EXECUTE : PH_FETCH;
  end

endmodule
