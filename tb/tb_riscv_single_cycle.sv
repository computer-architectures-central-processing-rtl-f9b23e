// tb_riscv_single_cycle - self-checking test of the single-cycle CPU.
//
// Loads a program through the instruction-memory load port during reset,
// then runs the CPU in lockstep with the instruction-level model (rv_ref):
// after every clock the PC and all 31 registers must match the model, so
// every instruction completes in exactly one clock (IPC = 1). Three programs
// run: the directed test of every instruction, log2(157) = 7, and the
// compiler's machine code of the same loop (0x09d00513 ...), which uses
// srli and bne from outside the subset: those two words must raise illegal
// and change nothing, so the loop body runs once. Each run ends at ebreak,
// which must be flagged illegal; the data memory words the program wrote
// are compared at the end.
module tb_riscv_single_cycle;
  `include "rv_asm.svh"
  `include "rv_ref.svh"
  `include "rv_programs.svh"

  localparam logic [31:0] RESET_PC = 32'h0000_0200;

  logic        clk = 0, rst_n = 0;
  logic        load_we = 0;
  logic [31:0] load_addr = 0, load_data = 0;
  logic [31:0] pc, instr;
  logic        illegal;
  int checks = 0, failures = 0;

  riscv_single_cycle #(.RESET_PC(RESET_PC), .IMEM_WORDS(1024), .DMEM_WORDS(1024)) dut (
    .clk, .rst_n,
    .imem_load_we (load_we), .imem_load_addr (load_addr), .imem_load_data (load_data),
    .pc, .instr, .illegal
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run(input prog_t prog, input string name, output rv_model m, output int cycles);
    m = new(RESET_PC);
    rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      load_we = 1; load_addr = RESET_PC + 32'(i) * 4; load_data = prog[i];
      m.imem[int'(load_addr >> 2)] = prog[i];
    end
    // the CPU starts from an empty data memory in the model; clear the words used
    @(negedge clk);
    load_we = 0;
    for (int i = 0; i < 1024; i++) dut.u_dmem.mem[i] = '0;
    @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (1) begin
      // before the edge: the executing instruction
      check(pc == m.pc, $sformatf("%s: pc %h, model %h", name, pc, m.pc));
      m.step();
      check(illegal == m.illegal, $sformatf("%s: illegal flag at %h", name, pc));
      if (instr == EBREAK) break;
      @(negedge clk);
      cycles++;
      for (int r = 1; r < 32; r++)
        check(dut.u_rf.regs[r] == m.x[r],
              $sformatf("%s: after %0d clocks x%0d = %h, model %h", name, cycles, r, dut.u_rf.regs[r], m.x[r]));
      if (cycles > 5000) begin
        check(0, $sformatf("%s: program did not reach ebreak", name));
        break;
      end
    end
    foreach (m.dmem[i])
      check(dut.u_dmem.mem[i] == m.dmem[i], $sformatf("%s: dmem word %0d", name, i));
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv_model m;
    int cycles;
    run(directed(), "directed", m, cycles);
    check(cycles == m.n_instr - 1, $sformatf("directed: %0d clocks for %0d instructions", cycles, m.n_instr - 1));
    // independent spot checks of the directed program
    check(dut.u_rf.regs[3]  == 32'd156,         "add");
    check(dut.u_rf.regs[4]  == 32'd158,         "sub");
    check(dut.u_rf.regs[7]  == 32'd1,           "slt -1 < 157");
    check(dut.u_rf.regs[8]  == 32'd0,           "slt 157 < -1");
    check(dut.u_rf.regs[9]  == 32'h0000_00f0,   "ori");
    check(dut.u_rf.regs[10] == 32'd13,          "andi");
    check(dut.u_rf.regs[11] == 32'h1234_5000,   "lui");
    check(dut.u_rf.regs[12] == 32'h0000_122c,   "auipc");
    check(dut.u_rf.regs[13] == 32'd157,         "lw 0x400");
    check(dut.u_rf.regs[15] == 32'h1234_5000,   "lw 0x404");
    check(dut.u_rf.regs[16] == 32'd1,           "beq not taken / taken");
    check(dut.u_rf.regs[17] == 32'h0000_0258,   "jal link");
    check(dut.u_rf.regs[18] == 32'd0,           "jal skipped");
    check(dut.u_rf.regs[20] == 32'h0000_0268,   "jalr link");
    check(dut.u_rf.regs[21] == 32'd0,           "jalr skipped");
    check(dut.u_rf.regs[23] == 32'd21,          "loop");
    check(dut.u_rf.regs[24] == 32'd21,          "sw/lw at 0");
    check(m.n_branch_taken > 0 && m.n_branch_not_taken > 0 && m.n_jal > 0 && m.n_jalr > 0,
          "all control transfers exercised");

    run(log2(157), "log2", m, cycles);
    check(dut.u_rf.regs[10] == 32'd7, $sformatf("log2(157) = %0d", dut.u_rf.regs[10]));
    check(cycles == m.n_instr - 1, "log2: one clock per instruction");
    $display("log2(157): %0d instructions in %0d clocks", m.n_instr - 1, cycles);

    // the compiled loop as machine code at 0x200..0x21c
    begin
      prog_t p;
      p = '{32'h09d00513, 32'hfff00313, 32'h00050863, 32'h00155513,
            32'h00130313, 32'hfe051ce3, 32'h00030513, 32'h00100073};
      run(p, "compiled", m, cycles);
    end
    check(cycles == 7, $sformatf("compiled: %0d clocks to ebreak", cycles));
    check(m.n_illegal == 3, $sformatf("compiled: %0d illegal words (srli, bne, ebreak)", m.n_illegal));
    check(dut.u_rf.regs[6] == 32'd0 && dut.u_rf.regs[10] == 32'd0, "compiled: body ran once, x10 = x6 = 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
