// control_unit - decoder of the single-cycle RISC-V CPU.
//
// A purely combinational table, as the lecture proposes for a single-cycle
// machine: opcode, funct3 and funct7 of the current instruction give every
// control signal of the datapath for that clock. The lecture's signals are
// ALUSrc, ALUControl, MemWrite, MemToReg, RegWrite, BranchBeq, BranchJal and
// BranchJalr. To run lui, auipc, jal and jalr, which the lecture lists but
// does not draw, this design adds the operand-A select (rs1, PC or zero),
// the PC+4 write-back select and the immediate format. Any encoding outside
// the subset raises `illegal` and writes neither a register nor memory; the
// PC then simply advances by 4.
//
// Subset: lw sw add sub and or slt addi andi ori lui auipc beq jal jalr.
module control_unit
  import rv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic [6:0] funct7,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl             = '0;
    ctrl.alu_src_a   = SRCA_RS1;
    ctrl.alu_control = ALU_ADD;
    ctrl.imm_sel     = IMM_I;

    unique case (opcode)
      OP_LOAD: begin
        if (funct3 == F3_SLT) begin  // lw: funct3 = 010
          ctrl.alu_src    = 1'b1;
          ctrl.mem_to_reg = 1'b1;
          ctrl.reg_write  = 1'b1;
        end else ctrl.illegal = 1'b1;
      end

      OP_STORE: begin
        if (funct3 == F3_SLT) begin  // sw: funct3 = 010
          ctrl.alu_src   = 1'b1;
          ctrl.imm_sel   = IMM_S;
          ctrl.mem_write = 1'b1;
        end else ctrl.illegal = 1'b1;
      end

      OP_REG: begin
        ctrl.reg_write = 1'b1;
        unique case ({funct7, funct3})
          {F7_BASE, F3_ADD}: ctrl.alu_control = ALU_ADD;
          {F7_SUB,  F3_ADD}: ctrl.alu_control = ALU_SUB;
          {F7_BASE, F3_SLT}: ctrl.alu_control = ALU_SLT;
          {F7_BASE, F3_OR }: ctrl.alu_control = ALU_OR;
          {F7_BASE, F3_AND}: ctrl.alu_control = ALU_AND;
          default: begin
            ctrl.reg_write = 1'b0;
            ctrl.illegal   = 1'b1;
          end
        endcase
      end

      OP_IMM: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        unique case (funct3)
          F3_ADD:  ctrl.alu_control = ALU_ADD;
          F3_OR:   ctrl.alu_control = ALU_OR;
          F3_AND:  ctrl.alu_control = ALU_AND;
          default: begin
            ctrl.reg_write = 1'b0;
            ctrl.illegal   = 1'b1;
          end
        endcase
      end

      OP_BRANCH: begin
        if (funct3 == F3_ADD) begin  // beq: funct3 = 000
          ctrl.alu_control = ALU_SUB;
          ctrl.imm_sel     = IMM_B;
          ctrl.branch_beq  = 1'b1;
        end else ctrl.illegal = 1'b1;
      end

      OP_JAL: begin
        ctrl.imm_sel    = IMM_J;
        ctrl.branch_jal = 1'b1;
        ctrl.pc4_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end

      OP_JALR: begin
        if (funct3 == F3_ADD) begin
          ctrl.alu_src     = 1'b1;
          ctrl.branch_jalr = 1'b1;
          ctrl.pc4_to_reg  = 1'b1;
          ctrl.reg_write   = 1'b1;
        end else ctrl.illegal = 1'b1;
      end

      OP_LUI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_src_a = SRCA_ZERO;
        ctrl.imm_sel   = IMM_U;
        ctrl.reg_write = 1'b1;
      end

      OP_AUIPC: begin
        ctrl.alu_src   = 1'b1;
        ctrl.alu_src_a = SRCA_PC;
        ctrl.imm_sel   = IMM_U;
        ctrl.reg_write = 1'b1;
      end

      default: ctrl.illegal = 1'b1;
    endcase
  end

endmodule
