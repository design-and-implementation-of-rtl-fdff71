// Shared widths, instruction encoding and control-signal bundle of the
// four-bit-datapath, eight-bit-instruction CPU.
//
// An instruction word is 8 bits: bits 7:4 are the opcode field and bits 3:0
// the operand. The instruction decoder looks at opcode bits 6:4 only (it has
// three input pairs); bit 7 is ignored. The six decoded instructions follow
// the design's decoder of six units; their binary codes are this design's
// own choice, as is the sixth instruction, CLR, which drives the
// accumulator-clear line.
package cpu8_pkg;

  localparam int unsigned DATA_W = 4;   // ALU, accumulator and PC width
  localparam int unsigned WORD_W = 8;   // ROM word width
  localparam int unsigned ROM_DEPTH = 16;

  // Opcode bits 6:4. 000 and 111 enable no decoder unit: no operation.
  typedef enum logic [2:0] {
    OP_NOP = 3'b000,
    OP_LDA = 3'b001,
    OP_ADD = 3'b010,
    OP_SUB = 3'b011,
    OP_JMP = 3'b100,
    OP_CLR = 3'b101,
    OP_HLT = 3'b110,
    OP_NOP7 = 3'b111
  } opcode_e;

  // One line per decoder unit.
  typedef struct packed {
    logic hlt;
    logic clr;
    logic jmp;
    logic sub;
    logic add;
    logic lda;
  } instr_lines_t;

  // Ring-counter phases.
  typedef enum logic {
    PH_FETCH   = 1'b0,
    PH_EXECUTE = 1'b1
  } phase_e;

  // Outputs of the control matrix.
  typedef struct packed {
    logic              ir_load;   // instruction register loads the ROM bus
    logic              pc_inc;    // program counter counts up
    logic              pc_clr;    // program counter CLEAR pins
    logic [DATA_W-1:0] pc_set;    // program counter PRESET pins
    logic              acc_rom;   // accumulator loads the ROM operand (LDA)
    logic              acc_alu;   // accumulator loads the ALU result
    logic              aclr;      // accumulator clear (ACLR)
    logic              alu_sub;   // ALU subtract control
    logic              halt_set;  // set the halt latch
  } ctrl_t;

  // Build a ROM word from an opcode and operand.
  function automatic logic [WORD_W-1:0] instr(opcode_e op, logic [DATA_W-1:0] operand);
    return {1'b0, op, operand};
  endfunction

endpackage
