// microprog_cu - horizontal microprogrammed control unit.
//
// A small computer inside the CPU: the current microinstruction address
// register (CMIAR, the micro-PC) addresses the microcode memory, and the
// addressed horizontal microinstruction drives the control signals
// directly. Microinstruction layout, most significant field first:
//   internal CPU control signals (INT_W bits)
//   system bus control signals   (BUS_W bits)
//   jump condition               (3 bits, ucond_e)
//   microinstruction address     (AW bits)
// Next CMIAR: the address field when the condition holds (unconditional,
// Zero, Overflow, Indirect bit), CMIAR+1 when it does not or for STEP, and
// for DISPATCH the start of the routine of the machine instruction, taken
// from its operation code (opcode_in * 4). The operation code register (OR)
// captures opcode_in on a DISPATCH and keeps it for the routine.
// The four jump conditions and the field order are the lecture's; the
// STEP and DISPATCH codes, the field widths, the dispatch mapping and the
// writable microcode memory with its load port (the lecture allows ROM or
// RWM loaded at start-up) are this design's.
// Timing: the outputs are combinational from CMIAR through the memory;
// CMIAR and OR change at the rising edge; reset (synchronous, active low)
// sets CMIAR to 0.
module microprog_cu #(
  parameter int unsigned AW    = 8,   // microcode address width
  parameter int unsigned OPW   = 6,   // operation code width
  parameter int unsigned INT_W = 16,  // internal CPU control signals
  parameter int unsigned BUS_W = 4    // system bus control signals
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [OPW-1:0]   opcode_in,   // operation code of the fetched instruction
  input  logic             flag_zero,
  input  logic             flag_ovf,
  input  logic             flag_ind,    // indirect addressing bit
  output logic [INT_W-1:0] int_ctrl,
  output logic [BUS_W-1:0] bus_ctrl,
  output logic [AW-1:0]    cmiar,
  output logic [OPW-1:0]   op_reg,
  // microcode load port
  input  logic             ucode_we,
  input  logic [AW-1:0]    ucode_addr,
  input  logic [INT_W+BUS_W+3+AW-1:0] ucode_data
);

  typedef enum logic [2:0] {
    UC_STEP     = 3'd0,  // continue with the next microinstruction
    UC_UNCOND   = 3'd1,
    UC_ZERO     = 3'd2,
    UC_OVF      = 3'd3,
    UC_IND      = 3'd4,
    UC_DISPATCH = 3'd5   // jump to the routine of opcode_in
  } ucond_e;

  typedef struct packed {
    logic [INT_W-1:0] int_ctrl;
    logic [BUS_W-1:0] bus_ctrl;
    ucond_e           cond;
    logic [AW-1:0]    addr;
  } uinstr_t;

  localparam int unsigned WORDS = 1 << AW;

  uinstr_t     ucode [WORDS];
  uinstr_t     uir;
  logic        taken;
  logic [AW-1:0] dispatch_addr;

  always_ff @(posedge clk) begin
    if (ucode_we) ucode[ucode_addr] <= uinstr_t'(ucode_data);
  end

  assign uir      = ucode[cmiar];
  assign int_ctrl = uir.int_ctrl;
  assign bus_ctrl = uir.bus_ctrl;

  assign dispatch_addr = AW'({opcode_in, 2'b00});

  always_comb begin
    unique case (uir.cond)
      UC_UNCOND: taken = 1'b1;
      UC_ZERO:   taken = flag_zero;
      UC_OVF:    taken = flag_ovf;
      UC_IND:    taken = flag_ind;
      default:   taken = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmiar  <= '0;
      op_reg <= '0;
    end else if (uir.cond == UC_DISPATCH) begin
      cmiar  <= dispatch_addr;
      op_reg <= opcode_in;
    end else if (taken) begin
      cmiar  <= uir.addr;
    end else begin
      cmiar  <= cmiar + 1'b1;
    end
  end

endmodule
