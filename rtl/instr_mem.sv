// instr_mem - instruction memory (ROM seen from the CPU).
//
// The CPU side is a combinational read port: RD is the 32-bit word at byte
// address A, word index A[AW+1:2], higher address bits ignored. The lecture
// treats this memory as a ROM; a synchronous load port (load_we, load_addr,
// load_data, written at the rising clock edge) is this design's way of
// placing a program in it before the CPU is released from reset. The size
// (WORDS) is also this design's choice.
module instr_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] a,
  output logic [31:0] rd,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
