// tb_microprog_cu - self-checking test of the horizontal microprogrammed
// control unit. Random microcode (all jump conditions, including DISPATCH
// and the unused codes) is loaded through the load port; then, with random
// status flags and opcodes every clock, the control outputs must equal the
// fields of the microinstruction a reference sequencer says is current, and
// CMIAR and the operation code register must follow the reference.
module tb_microprog_cu;
  localparam int AW = 8, OPW = 6, INT_W = 16, BUS_W = 4;
  localparam int UW = INT_W + BUS_W + 3 + AW;

  logic clk = 0, rst_n = 0;
  logic [OPW-1:0] opcode_in = 0;
  logic flag_zero = 0, flag_ovf = 0, flag_ind = 0;
  logic [INT_W-1:0] int_ctrl;
  logic [BUS_W-1:0] bus_ctrl;
  logic [AW-1:0] cmiar;
  logic [OPW-1:0] op_reg;
  logic ucode_we = 0;
  logic [AW-1:0] ucode_addr = 0;
  logic [UW-1:0] ucode_data = 0;
  logic [UW-1:0] rom [1 << AW];
  int checks = 0, failures = 0;
  int n_cond [8];

  microprog_cu #(.AW(AW), .OPW(OPW), .INT_W(INT_W), .BUS_W(BUS_W)) dut (
    .clk, .rst_n, .opcode_in, .flag_zero, .flag_ovf, .flag_ind,
    .int_ctrl, .bus_ctrl, .cmiar, .op_reg, .ucode_we, .ucode_addr, .ucode_data);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0]  ref_pc;
    logic [OPW-1:0] ref_op;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      rom[i] = {16'($urandom), 4'($urandom), 3'($urandom), 8'($urandom)};
      ucode_we = 1; ucode_addr = AW'(i); ucode_data = rom[i];
    end
    @(negedge clk);
    ucode_we = 0;
    @(negedge clk);
    rst_n = 1;
    ref_pc = '0; ref_op = '0;
    for (int c = 0; c < 5000; c++) begin
      logic [2:0]    cond;
      logic [AW-1:0] nxt;
      opcode_in = OPW'($urandom);
      flag_zero = 1'($urandom % 2); flag_ovf = 1'($urandom % 2); flag_ind = 1'($urandom % 2);
      #1;
      checks++;
      if (cmiar !== ref_pc || op_reg !== ref_op ||
          int_ctrl !== rom[ref_pc][UW-1 -: INT_W] || bus_ctrl !== rom[ref_pc][AW+3 +: BUS_W]) begin
        failures++;
        $display("FAIL clock %0d: cmiar=%h exp %h int=%h bus=%h", c, cmiar, ref_pc, int_ctrl, bus_ctrl);
      end
      cond = rom[ref_pc][AW +: 3];
      n_cond[cond]++;
      case (cond)
        3'd1: nxt = rom[ref_pc][AW-1:0];
        3'd2: nxt = flag_zero ? rom[ref_pc][AW-1:0] : ref_pc + 1;
        3'd3: nxt = flag_ovf  ? rom[ref_pc][AW-1:0] : ref_pc + 1;
        3'd4: nxt = flag_ind  ? rom[ref_pc][AW-1:0] : ref_pc + 1;
        3'd5: begin nxt = AW'(opcode_in) << 2; ref_op = opcode_in; end
        default: nxt = ref_pc + 1;
      endcase
      ref_pc = nxt;
      @(negedge clk);
    end
    // reset returns to microinstruction 0
    rst_n = 0;
    @(negedge clk);
    checks++;
    if (cmiar !== '0) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_cond[k] == 0) begin failures++; $display("FAIL condition %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
