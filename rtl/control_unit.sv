// Control unit: the one-bit ring counter, the control matrix and the halt
// latch.
//
// Every instruction takes two CPU clocks. In the fetch phase the instruction
// register loads the ROM bus; if it still holds a JMP (whose execute phase has
// just cleared the PC), the PRESET lines carry the jump target so the PC shows
// the target and that byte is fetched. In the execute phase the decoded
// instruction acts:
//   LDA  accumulator <= operand        ADD  accumulator <= A + operand
//   SUB  accumulator <= A - operand    CLR  accumulator <= 0 (ACLR)
//   JMP  PC cleared (first jump cycle) HLT  halt latch set, PC held
// and every instruction but JMP and HLT counts the PC up. The halt latch gates
// the clock and is cleared only by reset. The design gives the unit's inputs
// (ROM and instruction decoder), the ring counter, the two-cycle jump and the
// halt-gated clock; this signal table is this design's.
module control_unit
  import cpu8_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  input  instr_lines_t      lines,
  input  logic [DATA_W-1:0] operand,
  output ctrl_t             ctrl,
  output phase_e            phase,
  output logic              halt
);

  ring_counter u_ring (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (step),
    .phase (phase)
  );

  always_comb begin
    ctrl = '0;
    if (phase == PH_FETCH) begin
      ctrl.ir_load = 1'b1;
      if (lines.jmp) ctrl.pc_set = operand;
    end else begin
      ctrl.acc_rom  = lines.lda;
      ctrl.acc_alu  = lines.add | lines.sub;
      ctrl.alu_sub  = lines.sub;
      ctrl.aclr     = lines.clr;
      ctrl.pc_clr   = lines.jmp;
      ctrl.halt_set = lines.hlt;
      ctrl.pc_inc   = ~(lines.jmp | lines.hlt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      halt <= 1'b0;
    else if (step && ctrl.halt_set)
      halt <= 1'b1;
  end

endmodule
