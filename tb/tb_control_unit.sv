// Check of the control unit: for every decoded instruction the control
// signals of the fetch and execute phases are compared with the intended
// signal table, the phase alternates at every CPU clock, and the halt latch
// is set only by the execute phase of HLT and then stays set.
module tb_control_unit;
  import cpu8_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, step = 0;
  instr_lines_t lines = '0;
  logic [3:0] operand = '0;
  ctrl_t ctrl;
  phase_e phase;
  logic halt;

  control_unit dut (.clk(clk), .rst_n(rst_n), .step(step), .lines(lines),
                    .operand(operand), .ctrl(ctrl), .phase(phase), .halt(halt));

  always #5 clk = ~clk;

  function automatic ctrl_t expected(instr_lines_t l, phase_e ph, logic [3:0] opd);
    ctrl_t c = '0;
    if (ph == PH_FETCH) begin
      c.ir_load = 1;
      c.pc_set  = l.jmp ? opd : 4'h0;
    end else begin
      c.acc_rom  = l.lda;
      c.acc_alu  = l.add || l.sub;
      c.alu_sub  = l.sub;
      c.aclr     = l.clr;
      c.pc_clr   = l.jmp;
      c.halt_set = l.hlt;
      c.pc_inc   = !(l.jmp || l.hlt);
    end
    return c;
  endfunction

  task automatic check_now(string what);
    ctrl_t e;
    #1;
    e = expected(lines, phase, operand);
    checks++;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s phase=%0d lines=%b: ctrl=%b expected %b", what, phase, 6'(lines), ctrl, e);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_e prev;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    // Every instruction except HLT, in both phases, several operands.
    for (int k = 0; k < 40; k++) begin
      automatic int code = $urandom_range(0, 5);   // 0 none, 1..5 lda..clr
      lines = code == 0 ? '0 : instr_lines_t'(6'(1 << (code - 1)));
      operand = 4'($urandom);
      for (int p = 0; p < 2; p++) begin
        check_now("table");
        prev = phase;
        step = 1;
        @(posedge clk);
        #1;
        step = 0;
        checks++;
        if (phase === prev) begin failures++; $display("FAIL phase did not toggle"); end
        checks++;
        if (halt !== 1'b0) begin failures++; $display("FAIL halt set without HLT"); end
      end
    end
    // HLT: fetch phase must not halt, execute phase must.
    if (phase != PH_FETCH) begin step = 1; @(posedge clk); #1; step = 0; end
    lines = '0; lines.hlt = 1;
    check_now("HLT fetch");
    step = 1; @(posedge clk); #1; step = 0;
    checks++;
    if (halt !== 1'b0) begin failures++; $display("FAIL halt set in fetch"); end
    check_now("HLT execute");
    step = 1; @(posedge clk); #1; step = 0;
    checks++;
    if (halt !== 1'b1) begin failures++; $display("FAIL halt not set"); end
    lines = '0;
    repeat (3) begin step = 1; @(posedge clk); #1; end
    step = 0;
    checks++;
    if (halt !== 1'b1) begin failures++; $display("FAIL halt did not stay set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
