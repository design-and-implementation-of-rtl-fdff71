// Check of the accumulator: reset to 0; at CPU clocks ACLR clears, else
// load_rom takes the ROM operand, else load_alu takes the ALU value, else it
// holds; nothing changes without step. Random stimulus against a model.
module tb_accumulator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0, aclr = 0, load_rom = 0, load_alu = 0;
  logic [3:0] d_rom = '0, d_alu = '0, q, model;
  int n_clr = 0;

  accumulator dut (.clk(clk), .rst_n(rst_n), .step(step), .aclr(aclr),
                   .load_rom(load_rom), .load_alu(load_alu),
                   .d_rom(d_rom), .d_alu(d_alu), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 4'h0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    model = 4'h0;
    for (int i = 0; i < 600; i++) begin
      step = ($urandom % 4) != 0;
      aclr = ($urandom % 6) == 0;
      load_rom = 1'($urandom);
      load_alu = 1'($urandom);
      d_rom = 4'($urandom);
      d_alu = 4'($urandom);
      @(posedge clk);
      if (step) begin
        if (aclr) begin
          if (model != 0) n_clr++;
          model = 4'h0;
        end else if (load_rom) model = d_rom;
        else if (load_alu) model = d_alu;
      end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d q=%h expected %h", i, q, model);
      end
    end
    checks++;
    if (n_clr == 0) begin failures++; $display("FAIL clear of a non-zero value never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
