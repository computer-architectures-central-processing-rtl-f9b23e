// data_mem - data memory of the single-cycle CPU.
//
// Word-wide memory with a combinational read port (RD is the word at byte
// address A) and a write port that stores WD at the rising clock edge when
// WE = 1, the timing of the lecture's building-block slide. Only aligned
// words are accessed (lw/sw); the word index is A[AW+1:2] and higher bits
// are ignored. The size is this design's choice.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] a,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[a[AW+1:2]] <= wd;
  end

  assign rd = mem[a[AW+1:2]];

endmodule
