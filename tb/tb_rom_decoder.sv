// Exhaustive check of the ROM address decoder: for every address exactly
// the output line of that address is high.
module tb_rom_decoder;
  int checks = 0, failures = 0;
  logic [3:0]  addr;
  logic [15:0] sel;

  rom_decoder dut (.addr(addr), .sel(sel));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = 4'(i);
      #1;
      checks++;
      if (sel !== 16'(1 << i)) begin
        failures++;
        $display("FAIL addr=%0d sel=%h", i, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
