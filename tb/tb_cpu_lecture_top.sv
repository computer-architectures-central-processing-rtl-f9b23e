// tb_cpu_lecture_top - end-to-end test of the top at its default parameters.
//
// Four threads run side by side, one per design in the top:
//  - the single-cycle CPU runs the directed program and log2(157), each in
//    lockstep with the instruction-level model (PC and all registers after
//    every clock, one instruction per clock), ending at ebreak;
//  - the one-flip-flop-per-state unit fetches with random WAIT and I1B;
//  - the microprogrammed unit runs a small microprogram (fetch, dispatch on
//    the opcode, routines using every jump condition) against a reference
//    sequencer;
//  - the instruction length decoder gets the first parcel of every CPU
//    program word (all 32-bit) and random parcels biased toward each length
//    pattern, checked against the length rule.
// Each mechanism is counted and must happen at least once: beq taken and
// not taken, jal, jalr, lw, sw, an illegal instruction, a WAIT stall, both
// exits of the fetch sequence, every jump condition both taken and not
// taken, the opcode dispatch, and every instruction length (16, 32, 48, 64,
// 80..176 bits and reserved).
module tb_cpu_lecture_top;
  `include "rv_asm.svh"
  `include "rv_ref.svh"
  `include "rv_programs.svh"

  localparam logic [31:0] RESET_PC = 32'h0000_0200;  // the top's default

  logic        clk = 0, cpu_rst_n = 0, ohc_rst_n = 0, upc_rst_n = 0;
  // CPU
  logic        cpu_load_we = 0;
  logic [31:0] cpu_load_addr = 0, cpu_load_data = 0, cpu_pc, cpu_instr;
  logic        cpu_illegal;
  // one flip-flop per state unit
  logic ohc_start = 0, ohc_wait = 0, ohc_i1b = 0;
  logic ohc_pca, ohc_mr, ohc_wir1, ohc_pc_inc, ohc_exit_i1b, ohc_exit_n_i1b;
  logic [2:0] ohc_state;
  // microprogrammed unit
  logic [5:0]  upc_opcode = 0;
  logic        upc_zero = 0, upc_ovf = 0, upc_ind = 0;
  logic [15:0] upc_int;
  logic [3:0]  upc_bus;
  logic [7:0]  upc_cmiar;
  logic [5:0]  upc_op_reg;
  logic        upc_we = 0;
  logic [7:0]  upc_addr = 0;
  logic [30:0] upc_data = 0;
  // instruction length decoder
  logic [15:0] ild_parcel = 0;
  logic [7:0]  ild_len_bits;
  logic        ild_reserved;

  int checks = 0, failures = 0;
  bit cpu_ready = 0;  // CPU programs loaded; microcode loaded

  cpu_lecture_top dut (
    .clk, .cpu_rst_n, .ohc_rst_n, .upc_rst_n,
    .cpu_imem_load_we (cpu_load_we), .cpu_imem_load_addr (cpu_load_addr),
    .cpu_imem_load_data (cpu_load_data),
    .cpu_pc, .cpu_instr, .cpu_illegal,
    .ohc_start, .ohc_wait, .ohc_i1b,
    .ohc_pca_ext (1'b0), .ohc_mr_ext (1'b0), .ohc_pc_inc_ext (1'b0),
    .ohc_pca, .ohc_mr, .ohc_wir1, .ohc_pc_inc, .ohc_exit_i1b, .ohc_exit_n_i1b, .ohc_state,
    .upc_opcode, .upc_flag_zero (upc_zero), .upc_flag_ovf (upc_ovf), .upc_flag_ind (upc_ind),
    .upc_int_ctrl (upc_int), .upc_bus_ctrl (upc_bus), .upc_cmiar, .upc_op_reg,
    .upc_ucode_we (upc_we), .upc_ucode_addr (upc_addr), .upc_ucode_data (upc_data),
    .ild_parcel, .ild_len_bits, .ild_reserved
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // mechanism counters
  int n_beq_t, n_beq_nt, n_jal, n_jalr, n_lw, n_sw, n_illegal;
  int n_wait, n_exit1, n_exitn;
  int n_taken [6], n_not_taken [6];
  int n_len [12];  // index len/16 - 1 for 16..176 bits, 11 for reserved

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ CPU
  task automatic run_cpu(input prog_t prog, input string name, output rv_model m);
    int cycles;
    m = new(RESET_PC);
    cpu_rst_n = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      cpu_load_we = 1; cpu_load_addr = RESET_PC + 32'(i) * 4; cpu_load_data = prog[i];
      m.imem[int'(cpu_load_addr >> 2)] = prog[i];
    end
    @(negedge clk);
    cpu_load_we = 0;
    // the model starts from an all-zero data memory
    for (int i = 0; i < 1024; i++) dut.u_cpu.u_dmem.mem[i] = '0;
    cpu_rst_n = 1;
    cycles = 0;
    while (1) begin
      check(cpu_pc == m.pc, $sformatf("%s: pc %h, model %h", name, cpu_pc, m.pc));
      m.step();
      check(cpu_illegal == m.illegal, $sformatf("%s: illegal at %h", name, cpu_pc));
      if (cpu_instr == EBREAK) break;
      @(negedge clk);
      cycles++;
      for (int r = 1; r < 32; r++)
        check(dut.u_cpu.u_rf.regs[r] == m.x[r], $sformatf("%s: x%0d = %h, model %h", name, r, dut.u_cpu.u_rf.regs[r], m.x[r]));
      if (cycles > 5000) begin check(0, "program did not end"); break; end
    end
    check(cycles == m.n_instr - 1, $sformatf("%s: %0d clocks for %0d instructions", name, cycles, m.n_instr - 1));
    foreach (m.dmem[i]) check(dut.u_cpu.u_dmem.mem[i] == m.dmem[i], $sformatf("%s: dmem word %0d", name, i));
    n_beq_t += m.n_branch_taken; n_beq_nt += m.n_branch_not_taken; n_jal += m.n_jal; n_jalr += m.n_jalr;
    n_lw += m.n_load; n_sw += m.n_store; n_illegal += m.n_illegal;
  endtask

  task automatic cpu_thread();
    rv_model m;
    run_cpu(directed(), "directed", m);
    run_cpu(log2(157), "log2", m);
    check(dut.u_cpu.u_rf.regs[10] == 32'd7, "log2(157) = 7");
  endtask

  // ------------------------------------------------- one flip-flop per state
  task automatic ohc_thread();
    for (int f = 0; f < 100; f++) begin
      int waits;
      waits = (f % 4 == 0) ? 0 : int'($urandom % 4);
      @(negedge clk);
      ohc_start = 1;
      @(negedge clk);
      ohc_start = 0;
      check(ohc_state == 3'b001 && ohc_pca && !ohc_mr, "ohc M1");
      @(negedge clk);
      for (int w = 0; w < waits; w++) begin
        ohc_wait = 1;
        check(ohc_state == 3'b010 && ohc_pca && ohc_mr && ohc_wir1, "ohc M2 waiting");
        n_wait++;
        @(negedge clk);
      end
      ohc_wait = 0;
      check(ohc_state == 3'b010 && ohc_mr && ohc_wir1, "ohc M2");
      @(negedge clk);
      ohc_i1b = 1'($urandom % 2);
      #1;
      check(ohc_state == 3'b100 && ohc_pc_inc && !ohc_pca, "ohc M3");
      check(ohc_exit_i1b == ohc_i1b && ohc_exit_n_i1b == !ohc_i1b, "ohc exit");
      if (ohc_i1b) n_exit1++; else n_exitn++;
    end
  endtask

  // ------------------------------------------------ microprogrammed unit
  // cond codes: 0 step, 1 unconditional, 2 zero, 3 overflow, 4 indirect, 5 dispatch
  function automatic logic [30:0] uins(input logic [15:0] i, input logic [3:0] b,
                                       input logic [2:0] c, input logic [7:0] a);
    return {i, b, c, a};
  endfunction

  task automatic upc_thread();
    logic [30:0] rom [256];
    logic [7:0]  ref_pc;
    foreach (rom[i]) rom[i] = '0;
    rom[8'h00] = uins(16'h0001, 4'h1, 3'd0, 8'h00);  // fetch: memory read
    rom[8'h01] = uins(16'h0002, 4'h0, 3'd5, 8'h00);  // dispatch on the opcode
    rom[8'h04] = uins(16'h0010, 4'h0, 3'd2, 8'h10);  // opcode 1: if Zero -> 0x10
    rom[8'h05] = uins(16'h0020, 4'h0, 3'd3, 8'h10);  //   if Overflow -> 0x10
    rom[8'h06] = uins(16'h0040, 4'h0, 3'd4, 8'h10);  //   if Indirect -> 0x10
    rom[8'h07] = uins(16'h0080, 4'h2, 3'd1, 8'h00);  //   write, back to fetch
    rom[8'h08] = uins(16'h0200, 4'h0, 3'd1, 8'h00);  // opcode 2: one step, back to fetch
    rom[8'h10] = uins(16'h0100, 4'h0, 3'd1, 8'h00);  // indirect/zero path, back to fetch
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      upc_we = 1; upc_addr = 8'(i); upc_data = rom[i];
    end
    @(negedge clk);
    upc_we = 0;
    upc_rst_n = 1;
    ref_pc = '0;
    for (int c = 0; c < 600; c++) begin
      logic [2:0] cond;
      bit         t;
      upc_opcode = 6'(1 + ($urandom % 2));
      upc_zero = 1'($urandom % 2); upc_ovf = 1'($urandom % 2); upc_ind = 1'($urandom % 2);
      #1;
      check(upc_cmiar == ref_pc && upc_int == rom[ref_pc][30:15] && upc_bus == rom[ref_pc][14:11],
            $sformatf("upc clock %0d: cmiar %h exp %h", c, upc_cmiar, ref_pc));
      cond = rom[ref_pc][10:8];
      case (cond)
        3'd1: t = 1;
        3'd2: t = upc_zero;
        3'd3: t = upc_ovf;
        3'd4: t = upc_ind;
        default: t = 0;
      endcase
      if (cond == 3'd5) begin
        n_taken[5]++;
        ref_pc = 8'(upc_opcode) << 2;
      end else begin
        if (t) n_taken[cond]++; else n_not_taken[cond]++;
        ref_pc = t ? rom[ref_pc][7:0] : ref_pc + 1;
      end
      @(negedge clk);
    end
  endtask

  // length rule written from the bit patterns: aa != 11 -> 16; bbb != 111
  // -> 32; 011111 -> 48; 0111111 -> 64; x nnn xxxxx 1111111 -> 80+16*nnn,
  // reserved when nnn = 111. Returns 0 for reserved.
  function automatic int len_rule(input logic [15:0] p);
    if (p[1:0] != 2'b11)  return 16;
    if (p[4:2] != 3'b111) return 32;
    if (p[6:5] == 2'b00 || p[6:5] == 2'b10) return 48;
    if (p[6:5] == 2'b01)  return 64;
    if (p[14:12] == 3'b111) return 0;
    return 80 + 16 * int'(p[14:12]);
  endfunction

  task automatic ild_one(input logic [15:0] p, input string what);
    int e;
    @(negedge clk);
    ild_parcel = p;
    #1;
    e = len_rule(p);
    check(e == 0 ? (ild_reserved && ild_len_bits == 0) : (!ild_reserved && int'(ild_len_bits) == e),
          $sformatf("%s parcel %h length %0d reserved %b, expected %0d", what, p, ild_len_bits, ild_reserved, e));
    n_len[e == 0 ? 11 : e / 16 - 1]++;
  endtask

  task automatic ild_thread();
    prog_t progs [2];
    logic [15:0] p;
    progs[0] = directed();
    progs[1] = log2(157);
    foreach (progs[k])
      foreach (progs[k][i]) begin
        ild_one(progs[k][i][15:0], "program word");
        check(ild_len_bits == 8'd32, "CPU program words are 32-bit");
      end
    for (int i = 0; i < 3000; i++) begin
      p = 16'($urandom);
      // bias: force the low bits toward the long formats
      case ($urandom % 4)
        0: ;
        1: p[4:0] = 5'b11111;
        2: p[5:0] = 6'b111111;
        3: p[6:0] = 7'b1111111;
      endcase
      ild_one(p, "random");
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    ohc_rst_n = 1;
    fork
      cpu_thread();
      ohc_thread();
      upc_thread();
      ild_thread();
    join
    $display("CPU: beq taken %0d, beq not taken %0d, jal %0d, jalr %0d, lw %0d, sw %0d, illegal %0d",
             n_beq_t, n_beq_nt, n_jal, n_jalr, n_lw, n_sw, n_illegal);
    $display("one-hot unit: WAIT stalls %0d, I1B exits %0d, not-I1B exits %0d", n_wait, n_exit1, n_exitn);
    $display("microprogram: uncond %0d, zero %0d/%0d, ovf %0d/%0d, ind %0d/%0d, dispatch %0d",
             n_taken[1], n_taken[2], n_not_taken[2], n_taken[3], n_not_taken[3], n_taken[4], n_not_taken[4], n_taken[5]);
    check(n_beq_t > 0,  "beq taken happened");
    check(n_beq_nt > 0, "beq not taken happened");
    check(n_jal > 0,    "jal happened");
    check(n_jalr > 0,   "jalr happened");
    check(n_lw > 0,     "lw happened");
    check(n_sw > 0,     "sw happened");
    check(n_illegal > 0, "illegal instruction happened");
    check(n_wait > 0,   "WAIT stall happened");
    check(n_exit1 > 0,  "I1B exit happened");
    check(n_exitn > 0,  "not-I1B exit happened");
    check(n_taken[1] > 0, "unconditional jump happened");
    for (int k = 2; k <= 4; k++) check(n_taken[k] > 0 && n_not_taken[k] > 0, $sformatf("condition %0d both ways", k));
    check(n_taken[5] > 0, "dispatch happened");
    $display("instruction lengths (16..176, reserved): %p", n_len);
    foreach (n_len[k]) check(n_len[k] > 0, $sformatf("length class %0d happened", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
