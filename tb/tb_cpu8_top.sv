// End-to-end test of the whole CPU at its default parameters.
//
// A program is set on the ROM switches and run; a reference interpreter of
// the instruction set in this testbench predicts, instruction by instruction,
// the accumulator, the program counter, the carry of ADD/SUB and the halt,
// and a monitor compares them with the CPU at the end of every execute
// phase. It also checks that every instruction takes exactly two CPU clocks
// and that the instruction register holds the ROM byte the interpreter
// expects.
//
// Runs: (1) a directed program stepped by hand with bouncing button presses
// (manual mode), then (2) the same program and (3) 30 random programs in
// automatic mode at several clock periods. Each mechanism (LDA, ADD, SUB,
// carry out of ADD, borrow of SUB, forward and backward JMP, CLR, no-op,
// HLT with the clock gated, manual and automatic stepping, debounce) is
// counted and must occur at least once.
module tb_cpu8_top;
  import cpu8_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, auto_mode = 0, button = 0;
  logic [15:0] period = 16'd3;
  logic [15:0][7:0] dip;
  logic [3:0] acc, pc;
  logic [7:0] ir;
  logic phase, halted, cpu_step, carry;

  cpu8_top dut (
    .clk(clk), .rst_n(rst_n), .auto_mode(auto_mode), .button(button),
    .period(period), .dip(dip), .acc(acc), .pc(pc), .ir(ir), .phase(phase),
    .halted(halted), .cpu_step(cpu_step), .carry(carry));

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_lda, n_add, n_sub, n_carry, n_borrow, n_jmp_fwd, n_jmp_back, n_clr,
      n_nop, n_hlt, n_gated, n_manual, n_auto, n_bounce_rejected;

  // Reference interpreter state.
  logic [3:0] m_acc, m_pc;
  logic       m_halt;
  int         steps_in_instr;
  int         instr_done;

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  // At every execute-phase CPU clock, run one instruction of the model and
  // compare the CPU after the edge.
  logic       pending = 0;
  logic [3:0] exp_acc, exp_pc;
  logic       exp_halt;

  always @(posedge clk) begin
    if (rst_n && cpu_step) begin
      steps_in_instr++;
      if (auto_mode) n_auto++; else n_manual++;
      if (phase) begin
        logic [7:0] w;
        logic [3:0] opd;
        logic [4:0] full;
        w = dip[m_pc];
        opd = w[3:0];
        checks++;
        if (ir !== w) fail($sformatf("IR=%h expected ROM[%0d]=%h", ir, m_pc, w));
        checks++;
        if (steps_in_instr != 2) fail($sformatf("instruction took %0d CPU clocks", steps_in_instr));
        steps_in_instr = 0;
        case (opcode_e'(w[6:4]))
          OP_LDA: begin m_acc = opd; m_pc++; n_lda++; end
          OP_ADD: begin
            full = {1'b0, m_acc} + {1'b0, opd};
            checks++;
            if (carry !== full[4]) fail("ADD carry");
            if (full[4]) n_carry++;
            m_acc = full[3:0]; m_pc++; n_add++;
          end
          OP_SUB: begin
            full = {1'b0, m_acc} + {1'b0, ~opd} + 5'd1;
            checks++;
            if (carry !== full[4]) fail("SUB carry");
            if (!full[4]) n_borrow++;
            m_acc = full[3:0]; m_pc++; n_sub++;
          end
          OP_JMP: begin
            if (opd > m_pc) n_jmp_fwd++; else n_jmp_back++;
            m_pc = opd;
          end
          OP_CLR: begin m_acc = 4'h0; m_pc++; n_clr++; end
          OP_HLT: begin m_halt = 1; n_hlt++; end
          default: begin m_pc++; n_nop++; end
        endcase
        exp_acc = m_acc; exp_pc = m_pc; exp_halt = m_halt;
        pending = 1;
        instr_done++;
      end
    end
  end

  always @(negedge clk) begin
    if (pending) begin
      pending = 0;
      checks++;
      if (acc !== exp_acc) fail($sformatf("acc=%h expected %h", acc, exp_acc));
      checks++;
      if (pc !== exp_pc) fail($sformatf("pc=%h expected %h", pc, exp_pc));
      checks++;
      if (halted !== exp_halt) fail($sformatf("halted=%0d expected %0d", halted, exp_halt));
    end
    if (rst_n && auto_mode && halted && !cpu_step) n_gated++;
  end

  task automatic reset_cpu();
    rst_n = 0;
    button = 0;
    repeat (3) @(posedge clk);
    m_acc = 0; m_pc = 0; m_halt = 0; steps_in_instr = 0; pending = 0;
    #1 rst_n = 1;
  endtask

  // Let the CPU run until it halts or max_instr instructions are done.
  task automatic run_auto(int max_instr);
    int start = instr_done;
    auto_mode = 1;
    while (!m_halt && instr_done - start < max_instr) @(posedge clk);
    // Stay a while: a halted CPU must issue no more CPU clocks.
    repeat (10 * period + 10) @(posedge clk);
    if (m_halt) begin
      checks++;
      if (!halted) fail("CPU not halted");
    end
    auto_mode = 0;
  endtask

  // One push of the step button, with contact bounce on press and release.
  task automatic press();
    int n_before = n_manual;
    for (int i = 0; i < 5; i++) begin
      button = 1; repeat (4) @(posedge clk);
      button = 0; repeat (3) @(posedge clk);
    end
    button = 1; repeat (60) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      button = 0; repeat (3) @(posedge clk);
      button = 1; repeat (3) @(posedge clk);
    end
    button = 0;
    repeat (dut.MONO_CYCLES + 20) @(posedge clk);
    checks++;
    if (!m_halt && n_manual - n_before != 1)
      fail($sformatf("press gave %0d CPU clocks", n_manual - n_before));
    else if (!m_halt) n_bounce_rejected++;
  endtask

  task automatic load_directed();
    dip = '0;
    dip[0]  = instr(OP_LDA, 4'd5);
    dip[1]  = instr(OP_ADD, 4'd3);     // 8
    dip[2]  = instr(OP_SUB, 4'd2);     // 6
    dip[3]  = instr(OP_JMP, 4'd6);     // forward jump
    dip[4]  = instr(OP_LDA, 4'd15);    // skipped
    dip[5]  = instr(OP_HLT, 4'd0);     // skipped
    dip[6]  = instr(OP_ADD, 4'd12);    // 18 -> 2, carry
    dip[7]  = instr(OP_SUB, 4'd5);     // -3 -> 13, borrow
    dip[8]  = instr(OP_CLR, 4'd9);     // 0
    dip[9]  = instr(OP_NOP, 4'd0);
    dip[10] = instr(OP_JMP, 4'd12);
    dip[11] = instr(OP_HLT, 4'd0);
    dip[12] = instr(OP_ADD, 4'd7);     // 7
    dip[13] = instr(OP_JMP, 4'd11);    // backward jump to HLT
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_lda = 0; n_add = 0; n_sub = 0; n_carry = 0; n_borrow = 0; n_jmp_fwd = 0;
    n_jmp_back = 0; n_clr = 0; n_nop = 0; n_hlt = 0; n_gated = 0; n_manual = 0;
    n_auto = 0; n_bounce_rejected = 0; instr_done = 0;
    load_directed();

    // (1) Directed program, stepped by hand until it halts.
    reset_cpu();
    for (int i = 0; i < 40 && !m_halt; i++) press();
    checks++;
    if (!m_halt || acc !== 4'd7 || pc !== 4'd11)
      fail($sformatf("manual run ended with acc=%0d pc=%0d halt=%0d", acc, pc, m_halt));
    // A press while halted gives no CPU clock.
    begin
      automatic int n_before = n_manual;
      press();
      checks++;
      if (n_manual != n_before) fail("CPU clock while halted (manual)");
    end

    // (2) Directed program in automatic mode.
    period = 16'd3;
    reset_cpu();
    run_auto(100);
    checks++;
    if (acc !== 4'd7 || pc !== 4'd11) fail("automatic directed run result");

    // (3) Random programs at random clock periods.
    for (int p = 0; p < 30; p++) begin
      for (int i = 0; i < 16; i++) dip[i] = 8'($urandom);
      period = 16'($urandom_range(1, 6));
      reset_cpu();
      run_auto(60);
    end

    // Every mechanism must have happened.
    begin
      automatic string names [14] = '{"LDA", "ADD", "SUB", "ADD carry", "SUB borrow", "JMP forward",
                            "JMP backward", "CLR", "NOP", "HLT", "clock gated by halt",
                            "manual step", "automatic step", "bounce rejected"};
      automatic int counts [14];
      counts = '{n_lda, n_add, n_sub, n_carry, n_borrow, n_jmp_fwd, n_jmp_back, n_clr,
                 n_nop, n_hlt, n_gated, n_manual, n_auto, n_bounce_rejected};
      for (int i = 0; i < 14; i++) begin
        $display("  %-20s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) fail({"mechanism never exercised: ", names[i]});
      end
    end
    $display("instructions executed: %0d", instr_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
