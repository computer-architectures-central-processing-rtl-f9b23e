// rv_asm.svh - instruction encoders for the testbenches of the single-cycle
// CPU, included inside a testbench module.
//
// Each function returns the 32-bit machine word of one RV32I instruction,
// built from the field layout of the base ISA (R, I, S, B, U, J formats).
// Branch and jump offsets are byte offsets relative to the instruction.

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] i_type(input int imm, input int rs1, input logic [2:0] f3,
                                         input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction

  function automatic logic [31:0] add (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] sub (input int rd, rs1, rs2); return r_type(7'h20, rs2, rs1, 3'b000, rd, 7'b0110011); endfunction
  function automatic logic [31:0] slt (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b010, rd, 7'b0110011); endfunction
  function automatic logic [31:0] or_ (input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b110, rd, 7'b0110011); endfunction
  function automatic logic [31:0] and_(input int rd, rs1, rs2); return r_type(7'h00, rs2, rs1, 3'b111, rd, 7'b0110011); endfunction

  function automatic logic [31:0] addi(input int rd, rs1, imm); return i_type(imm, rs1, 3'b000, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ori (input int rd, rs1, imm); return i_type(imm, rs1, 3'b110, rd, 7'b0010011); endfunction
  function automatic logic [31:0] andi(input int rd, rs1, imm); return i_type(imm, rs1, 3'b111, rd, 7'b0010011); endfunction
  function automatic logic [31:0] lw  (input int rd, imm, rs1); return i_type(imm, rs1, 3'b010, rd, 7'b0000011); endfunction
  function automatic logic [31:0] jalr(input int rd, rs1, imm); return i_type(imm, rs1, 3'b000, rd, 7'b1100111); endfunction

  function automatic logic [31:0] sw(input int rs2, imm, rs1);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] b_type(input logic [2:0] f3, input int rs1, rs2, off);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] beq(input int rs1, rs2, off); return b_type(3'b000, rs1, rs2, off); endfunction
  function automatic logic [31:0] bne(input int rs1, rs2, off); return b_type(3'b001, rs1, rs2, off); endfunction

  function automatic logic [31:0] jal(input int rd, off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] lui  (input int rd, logic [19:0] imm20); return {imm20, 5'(rd), 7'b0110111}; endfunction
  function automatic logic [31:0] auipc(input int rd, logic [19:0] imm20); return {imm20, 5'(rd), 7'b0010111}; endfunction

  localparam logic [31:0] EBREAK = 32'h0010_0073;

