// reg_file - the 32 general-purpose registers x0..x31.
//
// Two combinational read ports (A1 -> RD1, A2 -> RD2) and one write port:
// WD3 is written into register A3 at the rising clock edge when WE3 = 1.
// x0 always reads as zero and writes to it are dropped, as RISC-V requires.
// A write and a read of the same register in one cycle return the old value
// until the edge. The synchronous reset clearing x1..x31 is this design's
// addition, so that programs start from known register values.
module reg_file #(
  parameter int unsigned XLEN  = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we3,
  input  logic [$clog2(NREGS)-1:0] a1,
  input  logic [$clog2(NREGS)-1:0] a2,
  input  logic [$clog2(NREGS)-1:0] a3,
  input  logic [XLEN-1:0]          wd3,
  output logic [XLEN-1:0]          rd1,
  output logic [XLEN-1:0]          rd2
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we3 && a3 != '0) begin
      regs[a3] <= wd3;
    end
  end

  assign rd1 = (a1 == '0) ? '0 : regs[a1];
  assign rd2 = (a2 == '0) ? '0 : regs[a2];

endmodule
