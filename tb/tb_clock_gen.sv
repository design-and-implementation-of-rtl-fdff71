// Check of the clock source. Automatic mode: with period N the step pulses
// are exactly N reference cycles apart, for several N, and stop while halt is
// high. Manual mode: a press with contact bounce gives exactly one step, a
// second press after the lock-out time gives another, and a press while
// halted gives none. MONO_CYCLES is shortened to keep the run short.
module tb_clock_gen;
  localparam int MONO = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, auto_mode = 0, button = 0, halt = 0;
  logic [15:0] period = 16'd4;
  logic step;
  int steps = 0;

  clock_gen #(.MONO_CYCLES(MONO)) dut (
    .clk(clk), .rst_n(rst_n), .auto_mode(auto_mode), .button(button),
    .period(period), .halt(halt), .step(step));

  always #5 clk = ~clk;
  always @(posedge clk) if (step) steps++;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic bouncy_press();
    for (int i = 0; i < 6; i++) begin
      button = 1; repeat (3) @(posedge clk);
      button = 0; repeat (2) @(posedge clk);
    end
    button = 1; repeat (20) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      button = 0; repeat (2) @(posedge clk);
      button = 1; repeat (2) @(posedge clk);
    end
    button = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Automatic mode at several periods.
    for (int k = 0; k < 4; k++) begin
      automatic int per = (k == 0) ? 1 : (k == 1) ? 3 : (k == 2) ? 7 : 20;
      automatic int last = -1, gaps_ok = 1, first = 1;
      period = 16'(per);
      auto_mode = 1;
      n0 = steps;
      for (int c = 0; c < per * 10 + 2; c++) begin
        @(posedge clk);
        if (step) begin
          if (first == 0 && c - last != per) gaps_ok = 0;
          first = 0;
          last = c;
        end
      end
      expect_eq(gaps_ok, 1, $sformatf("step spacing at period %0d", per));
      expect_eq(int'(steps - n0 >= 10), 1, $sformatf("step count at period %0d", per));
      auto_mode = 0;
      repeat (3) @(posedge clk);
    end
    // Halt gates the automatic clock.
    period = 16'd2;
    auto_mode = 1;
    halt = 1;
    n0 = steps;
    repeat (30) @(posedge clk);
    expect_eq(steps - n0, 0, "steps while halted (auto)");
    halt = 0;
    auto_mode = 0;
    repeat (5) @(posedge clk);
    // Manual mode: one step per bouncy press.
    n0 = steps;
    bouncy_press();
    repeat (MONO + 10) @(posedge clk);
    expect_eq(steps - n0, 1, "steps for first press");
    bouncy_press();
    repeat (MONO + 10) @(posedge clk);
    expect_eq(steps - n0, 2, "steps after second press");
    halt = 1;
    bouncy_press();
    repeat (MONO + 10) @(posedge clk);
    expect_eq(steps - n0, 2, "steps for a press while halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
