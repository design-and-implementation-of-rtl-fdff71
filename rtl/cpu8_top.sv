// Four-bit-datapath CPU with 8-bit instructions held in a 16-byte
// switch-programmed ROM.
//
// Dataflow: the clock source issues CPU clocks (cpu_step, one reference cycle
// wide); the program counter addresses the ROM through the one-hot ROM
// decoder; the ROM word goes to the instruction register; its opcode bits 6:4
// go to the instruction decoder and from there to the control unit, which
// also holds the fetch/execute ring counter and the halt latch. The ALU adds
// or subtracts the operand (bits 3:0) to or from the accumulator and the
// accumulator takes the result, or the operand itself for LDA.
//
// Timing: each instruction takes two CPU clocks (fetch, execute). A JMP
// clears the PC in its execute clock and presets the target in the next
// fetch clock, so the target byte is fetched without a lost cycle. HLT stops
// the CPU clock until reset. All registers sample clk and change only when
// cpu_step is high; rst_n is an asynchronous active-low reset.
//
// The block structure, widths, jump sequence, ALU method and halt gating follow
// the design. The instruction codes, the CLR instruction and the use of a
// clock enable in place of a separate CPU clock are this design's choices.
// The control bundle's halt_set bit is used inside the control unit only, so
// it is left unread here. Concurrent assertions at the end state the
// decoders' one-hot rules and that CLEAR and PRESET never meet.
module cpu8_top
  import cpu8_pkg::*;
#(
  parameter int unsigned MONO_CYCLES = 1000,
  parameter int unsigned PERIOD_W    = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                auto_mode,
  input  logic                                button,
  input  logic [PERIOD_W-1:0]                 period,
  input  logic [ROM_DEPTH-1:0][WORD_W-1:0]    dip,
  output logic [DATA_W-1:0]                   acc,
  output logic [DATA_W-1:0]                   pc,
  output logic [WORD_W-1:0]                   ir,
  output logic                                phase,
  output logic                                halted,
  output logic                                cpu_step,
  output logic                                carry
);

  logic [ROM_DEPTH-1:0] rom_sel;
  logic [WORD_W-1:0]    rom_bus;
  instr_lines_t         lines;
  ctrl_t                ctrl;
  phase_e               ph;
  logic [DATA_W-1:0]    alu_y;
  logic [DATA_W-1:0]    operand;

  clock_gen #(
    .PERIOD_W    (PERIOD_W),
    .MONO_CYCLES (MONO_CYCLES)
  ) u_clock (
    .clk       (clk),
    .rst_n     (rst_n),
    .auto_mode (auto_mode),
    .button    (button),
    .period    (period),
    .halt      (halted),
    .step      (cpu_step)
  );

  program_counter #(.WIDTH(DATA_W)) u_pc (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (cpu_step),
    .inc      (ctrl.pc_inc),
    .clr      (ctrl.pc_clr),
    .set_mask (ctrl.pc_set),
    .q        (pc)
  );

  rom_decoder #(.ADDR_W(DATA_W)) u_rom_dec (
    .addr (pc),
    .sel  (rom_sel)
  );

  dip_rom #(.DEPTH(ROM_DEPTH), .WIDTH(WORD_W)) u_rom (
    .sel  (rom_sel),
    .dip  (dip),
    .data (rom_bus)
  );

  instr_reg #(.WIDTH(WORD_W)) u_ir (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (cpu_step),
    .load  (ctrl.ir_load),
    .d     (rom_bus),
    .q     (ir)
  );

  always_comb operand = ir[DATA_W-1:0];

  instr_decoder u_idec (
    .opcode (ir[6:4]),
    .lines  (lines)
  );

  control_unit u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (cpu_step),
    .lines   (lines),
    .operand (operand),
    .ctrl    (ctrl),
    .phase   (ph),
    .halt    (halted)
  );

  always_comb phase = ph;

  alu #(.WIDTH(DATA_W)) u_alu (
    .a    (acc),
    .b    (operand),
    .sub  (ctrl.alu_sub),
    .y    (alu_y),
    .cout (carry)
  );

  accumulator #(.WIDTH(DATA_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (cpu_step),
    .aclr     (ctrl.aclr),
    .load_rom (ctrl.acc_rom),
    .load_alu (ctrl.acc_alu),
    .d_rom    (operand),
    .d_alu    (alu_y),
    .q        (acc)
  );

  // Structural rules: exactly one ROM byte is enabled, at most one decoder
  // unit is active, and the PC is never cleared and preset in the same clock.
  // All three hold in reset as well.
  a_rom_sel_onehot: assert property (@(posedge clk)
    rom_sel != '0 && (rom_sel & (rom_sel - 1'b1)) == '0);
  a_lines_onehot0: assert property (@(posedge clk)
    (lines & (lines - 1'b1)) == '0);
  a_pc_clr_set: assert property (@(posedge clk)
    !(ctrl.pc_clr && ctrl.pc_set != '0));

endmodule
