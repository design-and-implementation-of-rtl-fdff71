// Instruction decoder: six AND units, one per instruction, over the three
// opcode bits and their complements.
//
// Each unit is high only for its own three-bit code, so at most one line is
// high; codes 000 and 111 raise none (no operation). Six units on three
// inputs follow the design; which code belongs to which unit, and CLR as the
// sixth instruction, are this design's choice (see cpu8_pkg). Combinational.
module instr_decoder
  import cpu8_pkg::*;
(
  input  logic [2:0]   opcode,
  output instr_lines_t lines
);

  always_comb begin
    lines.lda = (opcode == OP_LDA);
    lines.add = (opcode == OP_ADD);
    lines.sub = (opcode == OP_SUB);
    lines.jmp = (opcode == OP_JMP);
    lines.clr = (opcode == OP_CLR);
    lines.hlt = (opcode == OP_HLT);
  end

endmodule
