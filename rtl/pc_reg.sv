// pc_reg - program counter of the single-cycle CPU.
//
// A 32-bit register that takes the next instruction address PC' at every
// rising clock edge, so one instruction is fetched per clock. A synchronous,
// active-low reset loads RESET_PC, the address of the first instruction.
// The register itself follows the lecture's datapath; the reset value
// 0x200 (where the lecture's example program is placed) and the reset style
// are this design's choice.
module pc_reg #(
  parameter int unsigned       XLEN     = 32,
  parameter logic [XLEN-1:0]   RESET_PC = 32'h0000_0200
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] pc_next,
  output logic [XLEN-1:0] pc
);

  always_ff @(posedge clk) begin
    if (!rst_n) pc <= RESET_PC;
    else        pc <= pc_next;
  end

endmodule
