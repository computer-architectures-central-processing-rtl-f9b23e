// imm_decode - immediate operand decoder ("Imm decode" of the datapath).
//
// Builds the 32-bit sign-extended immediate SignImm from the instruction
// word in one of the five RISC-V formats. The bit positions are those of
// the standard encoding: the sign always comes from instr[31], and the other
// fields keep the same instruction bit positions across formats so the
// multiplexing stays small. B and J immediates have bit 0 = 0. Purely
// combinational; imm_sel comes from the control unit (this design's name for
// the select, the lecture does not name it).
module imm_decode
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  input  imm_fmt_e    imm_sel,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_sel)
      IMM_I:   imm = {{21{instr[31]}}, instr[30:25], instr[24:21], instr[20]};
      IMM_S:   imm = {{21{instr[31]}}, instr[30:25], instr[11:8], instr[7]};
      IMM_B:   imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   imm = {instr[31], instr[30:20], instr[19:12], 12'b0};
      IMM_J:   imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:25], instr[24:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
