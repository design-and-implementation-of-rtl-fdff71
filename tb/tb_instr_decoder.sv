// Exhaustive check of the instruction decoder: each of the eight opcode
// values raises only its own line (001 LDA, 010 ADD, 011 SUB, 100 JMP,
// 101 CLR, 110 HLT) and 000 and 111 raise none.
module tb_instr_decoder;
  import cpu8_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0]   opcode;
  instr_lines_t lines;

  instr_decoder dut (.opcode(opcode), .lines(lines));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Expected 6-bit pattern {hlt, clr, jmp, sub, add, lda} per code.
    automatic logic [5:0] exp [8] = '{6'b000000, 6'b000001, 6'b000010, 6'b000100,
                            6'b001000, 6'b010000, 6'b100000, 6'b000000};
    for (int i = 0; i < 8; i++) begin
      opcode = 3'(i);
      #1;
      checks++;
      if (6'(lines) !== exp[i]) begin
        failures++;
        $display("FAIL opcode=%b lines=%b expected %b", 3'(i), 6'(lines), exp[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
