// rv_pkg - shared types and constants of the single-cycle RISC-V CPU.
//
// Holds the opcode and function-field values of the implemented RV32I
// subset, the ALU operation and immediate-format enums, and the control
// word (ctrl_t) that the control unit hands to the datapath. The opcode
// values are the standard RV32I ones; the ALU and select encodings are this
// design's own, since the control table of the lecture leaves those columns
// to the reader.
package rv_pkg;

  localparam int unsigned XLEN = 32;

  // Major opcodes, instr[6:0]
  localparam logic [6:0] OP_LOAD   = 7'b0000011;  // lw
  localparam logic [6:0] OP_STORE  = 7'b0100011;  // sw
  localparam logic [6:0] OP_REG    = 7'b0110011;  // add sub slt or and
  localparam logic [6:0] OP_IMM    = 7'b0010011;  // addi ori andi
  localparam logic [6:0] OP_BRANCH = 7'b1100011;  // beq
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;

  // funct3 values used by the subset
  localparam logic [2:0] F3_ADD = 3'b000;  // add, sub, addi, beq, jalr
  localparam logic [2:0] F3_SLT = 3'b010;  // slt, lw, sw
  localparam logic [2:0] F3_OR  = 3'b110;
  localparam logic [2:0] F3_AND = 3'b111;

  localparam logic [6:0] F7_BASE = 7'b0000000;
  localparam logic [6:0] F7_SUB  = 7'b0100000;

  // ALUControl
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // Immediate format selected in the immediate decoder
  typedef enum logic [2:0] {
    IMM_I = 3'd0,
    IMM_S = 3'd1,
    IMM_B = 3'd2,
    IMM_U = 3'd3,
    IMM_J = 3'd4
  } imm_fmt_e;

  // Operand A of the ALU: rs1, the PC (auipc) or zero (lui)
  typedef enum logic [1:0] {
    SRCA_RS1  = 2'd0,
    SRCA_PC   = 2'd1,
    SRCA_ZERO = 2'd2
  } srca_e;

  // Control word of one instruction
  typedef struct packed {
    logic     alu_src;      // ALUSrc: 0 = rs2, 1 = SignImm
    srca_e    alu_src_a;    // operand A select
    alu_op_e  alu_control;  // ALUControl
    imm_fmt_e imm_sel;      // immediate format
    logic     mem_write;    // MemWrite
    logic     mem_to_reg;   // MemToReg: 1 = ReadData to rd
    logic     pc4_to_reg;   // 1 = PC+4 to rd (jal, jalr)
    logic     reg_write;    // RegWrite
    logic     branch_beq;   // BranchBeq
    logic     branch_jal;   // BranchJal
    logic     branch_jalr;  // BranchJalr
    logic     illegal;      // opcode/funct outside the subset
  } ctrl_t;

endpackage
