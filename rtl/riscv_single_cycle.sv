// riscv_single_cycle - single-cycle RV32I-subset CPU with separate
// instruction and data memories (Harvard organisation).
//
// Every instruction is fetched, decoded, executed and written back within
// one clock period: the PC addresses the instruction memory, the instruction
// fields address the register file and the immediate decoder, the ALU works
// on rs1 (or PC or zero) and rs2 (or SignImm), the ALU result addresses the
// data memory, and at the rising edge the PC, the destination register and
// (for sw) the data memory are updated together. The throughput is therefore
// exactly one instruction per clock; the clock period is set by the longest
// path (lw: PC, instruction memory, register read, ALU, data memory, result
// multiplexer, register setup).
//
// Next PC: PC+4; PC+SignImm for jal and for beq when the ALU's Zero is set;
// (rs1+SignImm) with bit 0 cleared for jalr. Result written to rd: AluOut,
// ReadData (lw) or PC+4 (jal, jalr). The datapath follows the lecture's
// figures; the extra operand-A select for lui/auipc, the PC+4 write-back,
// the jalr target path and the program-load port of the instruction memory
// are this design's completion of what the lecture lists but does not draw.
//
// Interface: clk, rst_n (synchronous, active low; PC := RESET_PC, registers
// cleared), imem_load_* (write a program word while in reset), pc and instr
// of the instruction being executed, illegal = that instruction is outside
// the subset (it is then executed as a no-op).
module riscv_single_cycle
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC    = 32'h0000_0200,
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned DMEM_WORDS  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        illegal
);

  ctrl_t       ctrl;
  logic [31:0] pc_next, pc_plus4, pc_branch;
  logic [31:0] rd1, rd2, sign_imm;
  logic [31:0] src_a, src_b, alu_out, read_data, result;
  logic        zero;

  // ---------------------------------------------------------------- fetch
  pc_reg #(.XLEN(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n, .pc_next, .pc
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .a         (pc),
    .rd        (instr),
    .load_we   (imem_load_we),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  assign pc_plus4 = pc + 32'd4;

  // --------------------------------------------------------------- decode
  control_unit u_cu (
    .opcode (instr[6:0]),
    .funct3 (instr[14:12]),
    .funct7 (instr[31:25]),
    .ctrl
  );

  assign illegal = ctrl.illegal;

  reg_file #(.XLEN(32), .NREGS(32)) u_rf (
    .clk, .rst_n,
    .we3 (ctrl.reg_write),
    .a1  (instr[19:15]),
    .a2  (instr[24:20]),
    .a3  (instr[11:7]),
    .wd3 (result),
    .rd1, .rd2
  );

  imm_decode u_imm (
    .instr,
    .imm_sel (ctrl.imm_sel),
    .imm     (sign_imm)
  );

  // -------------------------------------------------------------- execute
  always_comb begin
    unique case (ctrl.alu_src_a)
      SRCA_PC:   src_a = pc;
      SRCA_ZERO: src_a = '0;
      default:   src_a = rd1;
    endcase
  end

  assign src_b = ctrl.alu_src ? sign_imm : rd2;

  alu #(.W(32)) u_alu (
    .src_a, .src_b,
    .alu_control (ctrl.alu_control),
    .alu_out,
    .zero
  );

  assign pc_branch = pc + sign_imm;

  // --------------------------------------------------------------- memory
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk,
    .we (ctrl.mem_write & rst_n),  // no stores while held in reset
    .a  (alu_out),
    .wd (rd2),
    .rd (read_data)
  );

  // ------------------------------------------------------------ writeback
  assign result = ctrl.pc4_to_reg ? pc_plus4  :
                  ctrl.mem_to_reg ? read_data : alu_out;

  // -------------------------------------------------------------- next PC
  always_comb begin
    if (ctrl.branch_jalr)                              pc_next = {alu_out[31:1], 1'b0};
    else if (ctrl.branch_jal || (ctrl.branch_beq && zero)) pc_next = pc_branch;
    else                                               pc_next = pc_plus4;
  end

  // an instruction outside the subset changes neither registers nor memory
  a_illegal_no_write: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.illegal |-> !ctrl.reg_write && !ctrl.mem_write);

endmodule
