// alu - arithmetic and logic unit of the single-cycle CPU.
//
// Combinational. ALUControl selects add, subtract, bitwise and, bitwise or,
// or signed set-less-than (result 1 or 0) of SrcA and SrcB. Zero is 1 when
// the result is all zeros; beq subtracts its operands and branches on Zero.
// The operation set is the lecture's; the 3-bit ALUControl encoding is this
// design's (see rv_pkg::alu_op_e).
module alu
  import rv_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] src_a,
  input  logic [W-1:0] src_b,
  input  alu_op_e      alu_control,
  output logic [W-1:0] alu_out,
  output logic         zero
);

  always_comb begin
    unique case (alu_control)
      ALU_ADD: alu_out = src_a + src_b;
      ALU_SUB: alu_out = src_a - src_b;
      ALU_AND: alu_out = src_a & src_b;
      ALU_OR:  alu_out = src_a | src_b;
      ALU_SLT: alu_out = W'($signed(src_a) < $signed(src_b));
      default: alu_out = '0;
    endcase
  end

  assign zero = (alu_out == '0);

endmodule
