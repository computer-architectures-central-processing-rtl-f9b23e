// tb_control_unit - self-checking test of the single-cycle decoder: for
// every instruction of the subset the full control word is compared with an
// expected row written out by hand (the control table of the design), and
// encodings outside the subset (srli, bne, ebreak, slti, xor, an unknown
// opcode) must raise illegal with RegWrite = MemWrite = 0.
module tb_control_unit;
  import rv_pkg::*;
  `include "rv_asm.svh"

  logic [31:0] instr;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(instr[6:0]), .funct3(instr[14:12]), .funct7(instr[31:25]), .ctrl);

  // expected row: alu_src, srca, alu op, imm fmt, mem_write, mem_to_reg,
  //               pc4_to_reg, reg_write, beq, jal, jalr
  task automatic row(input string name, input logic [31:0] w, input logic asrc, input srca_e sa,
                     input alu_op_e aop, input imm_fmt_e imf, input logic mw, input logic m2r,
                     input logic p4, input logic rw, input logic bq, input logic jl, input logic jr);
    ctrl_t e;
    e = '0;
    e.alu_src = asrc; e.alu_src_a = sa; e.alu_control = aop; e.imm_sel = imf;
    e.mem_write = mw; e.mem_to_reg = m2r; e.pc4_to_reg = p4; e.reg_write = rw;
    e.branch_beq = bq; e.branch_jal = jl; e.branch_jalr = jr; e.illegal = 1'b0;
    instr = w;
    #1;
    checks++;
    // fields that do not matter for an instruction are compared too: the
    // decoder defines them, so a change shows up here
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s: got %p exp %p", name, ctrl, e);
    end
  endtask

  task automatic bad(input string name, input logic [31:0] w);
    instr = w;
    #1;
    checks++;
    if (!ctrl.illegal || ctrl.reg_write || ctrl.mem_write || ctrl.branch_beq || ctrl.branch_jal || ctrl.branch_jalr) begin
      failures++;
      $display("FAIL %s not rejected: %p", name, ctrl);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //        name     word                 asrc sa         aop      imm    mw m2r p4 rw bq jl jr
    row("lw",    32'h4000_2103,       1, SRCA_RS1,  ALU_ADD, IMM_I, 0, 1, 0, 1, 0, 0, 0);
    row("sw",    32'h4022_a223,       1, SRCA_RS1,  ALU_ADD, IMM_S, 1, 0, 0, 0, 0, 0, 0);
    row("add",   32'h0031_0233,       0, SRCA_RS1,  ALU_ADD, IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("sub",   sub(3, 4, 5),        0, SRCA_RS1,  ALU_SUB, IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("slt",   slt(3, 4, 5),        0, SRCA_RS1,  ALU_SLT, IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("or",    or_(3, 4, 5),        0, SRCA_RS1,  ALU_OR,  IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("and",   and_(3, 4, 5),       0, SRCA_RS1,  ALU_AND, IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("addi",  32'h09d0_0513,       1, SRCA_RS1,  ALU_ADD, IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("ori",   ori(1, 2, -5),       1, SRCA_RS1,  ALU_OR,  IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("andi",  andi(1, 2, 255),     1, SRCA_RS1,  ALU_AND, IMM_I, 0, 0, 0, 1, 0, 0, 0);
    row("beq",   32'h0005_0863,       0, SRCA_RS1,  ALU_SUB, IMM_B, 0, 0, 0, 0, 1, 0, 0);
    row("jal",   jal(1, 64),          0, SRCA_RS1,  ALU_ADD, IMM_J, 0, 0, 1, 1, 0, 1, 0);
    row("jalr",  jalr(0, 1, 0),       1, SRCA_RS1,  ALU_ADD, IMM_I, 0, 0, 1, 1, 0, 0, 1);
    row("lui",   lui(5, 20'h12345),   1, SRCA_ZERO, ALU_ADD, IMM_U, 0, 0, 0, 1, 0, 0, 0);
    row("auipc", auipc(5, 20'h1),     1, SRCA_PC,   ALU_ADD, IMM_U, 0, 0, 0, 1, 0, 0, 0);
    bad("srli",   32'h0015_5513);
    bad("bne",    32'hfe05_1ce3);
    bad("ebreak", EBREAK);
    bad("slti",   i_type(3, 1, 3'b010, 2, 7'b0010011));
    bad("xor",    r_type(7'h00, 1, 2, 3'b100, 3, 7'b0110011));
    bad("sub-f3", r_type(7'h20, 1, 2, 3'b111, 3, 7'b0110011));
    bad("lb",     i_type(0, 1, 3'b000, 2, 7'b0000011));
    bad("unknown", 32'h0000_007f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
