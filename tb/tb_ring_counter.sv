// Check of the one-bit ring counter: starts in fetch after reset, and
// toggles exactly on the reference-clock edges where step is high.
module tb_ring_counter;
  import cpu8_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0;
  phase_e phase;
  logic model;

  ring_counter dut (.clk(clk), .rst_n(rst_n), .step(step), .phase(phase));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (phase !== PH_FETCH) begin failures++; $display("FAIL reset phase"); end
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 300; i++) begin
      step = 1'($urandom);
      @(posedge clk);
      if (step) model = ~model;
      #1;
      checks++;
      if (phase !== phase_e'(model)) begin
        failures++;
        $display("FAIL cycle %0d phase=%0d expected %0d", i, phase, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
