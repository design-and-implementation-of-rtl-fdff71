// Check of the program counter: counting with wrap-around, holding, the
// immediate effect of CLEAR and PRESET on the output, the register keeping
// the forced value, and the two-cycle jump (clear, then preset the target).
// Random stimulus is compared with a model of r and q.
module tb_program_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, inc = 0, clr = 0;
  logic [3:0] set_mask = '0, q;
  logic [3:0] r_model;

  program_counter dut (.clk(clk), .rst_n(rst_n), .step(step), .inc(inc),
                       .clr(clr), .set_mask(set_mask), .q(q));

  always #5 clk = ~clk;

  function automatic logic [3:0] q_model();
    return (clr ? 4'h0 : r_model) | set_mask;
  endfunction

  task automatic cycle(logic s, logic i, logic c, logic [3:0] m);
    step = s; inc = i; clr = c; set_mask = m;
    #1;
    checks++;
    if (q !== q_model()) begin
      failures++;
      $display("FAIL before edge: q=%h expected %h", q, q_model());
    end
    @(posedge clk);
    if (s) r_model = i ? q_model() + 1'b1 : q_model();
    #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    r_model = 4'h0;
    // Count through a full wrap.
    for (int i = 0; i < 20; i++) cycle(1, 1, 0, 4'h0);
    checks++;
    if (q !== 4'd4) begin failures++; $display("FAIL count wrap q=%h", q); end
    // Jump to 9: first cycle clears, second presets.
    cycle(1, 0, 1, 4'h0);
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL after clear q=%h", q); end
    cycle(1, 0, 0, 4'h9);
    cycle(0, 0, 0, 4'h0);
    checks++;
    if (q !== 4'h9) begin failures++; $display("FAIL jump target q=%h", q); end
    // Random mix.
    for (int i = 0; i < 500; i++)
      cycle(1'($urandom), 1'($urandom), ($urandom % 8) == 0,
            ($urandom % 8) == 0 ? 4'($urandom) : 4'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
