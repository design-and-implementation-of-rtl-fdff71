// Check of the instruction register: reset to 0, loads d only on edges with
// both step and load high, otherwise holds; random stimulus against a model.
module tb_instr_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, load = 0;
  logic [7:0] d, q, model;

  instr_reg dut (.clk(clk), .rst_n(rst_n), .step(step), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'hA5;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1;
    model = 8'h00;
    for (int i = 0; i < 400; i++) begin
      step = 1'($urandom);
      load = 1'($urandom);
      d    = 8'($urandom);
      @(posedge clk);
      if (step && load) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
