// cpu_lecture_top - the three CPU control designs side by side.
//
// The main design is the single-cycle RISC-V CPU (riscv_single_cycle): a
// Harvard machine that fetches, decodes and executes one instruction of an
// RV32I subset per clock, controlled by a combinational decoder. Next to it
// stand two control-unit examples that are independent of that CPU:
//   - onehot_fetch_cu: a hardwired control unit in "one flip-flop per
//     state" style, the instruction-fetch part of its chain;
//   - microprog_cu: a horizontal microprogrammed control unit whose
//     microcode memory is loaded through a port;
//   - insn_length_decoder: the RISC-V instruction length rule, from the
//     first 16-bit parcel of an instruction (combinational).
// Each design keeps its own ports, prefixed cpu_, ohc_, upc_ and ild_, and its
// own synchronous active-low reset, so that the CPU can be held in reset
// while its program is loaded and the microprogrammed unit while its
// microcode is loaded; they share only the clock. Parameters are the
// defaults of the parts.
module cpu_lecture_top #(
  parameter logic [31:0] RESET_PC   = 32'h0000_0200,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned UAW        = 8,
  parameter int unsigned UOPW       = 6,
  parameter int unsigned UINT_W     = 16,
  parameter int unsigned UBUS_W     = 4
) (
  input  logic        clk,
  // single-cycle RISC-V CPU
  input  logic        cpu_rst_n,
  input  logic        cpu_imem_load_we,
  input  logic [31:0] cpu_imem_load_addr,
  input  logic [31:0] cpu_imem_load_data,
  output logic [31:0] cpu_pc,
  output logic [31:0] cpu_instr,
  output logic        cpu_illegal,
  // one flip-flop per state control unit
  input  logic        ohc_rst_n,
  input  logic        ohc_start,
  input  logic        ohc_wait,
  input  logic        ohc_i1b,
  input  logic        ohc_pca_ext,
  input  logic        ohc_mr_ext,
  input  logic        ohc_pc_inc_ext,
  output logic        ohc_pca,
  output logic        ohc_mr,
  output logic        ohc_wir1,
  output logic        ohc_pc_inc,
  output logic        ohc_exit_i1b,
  output logic        ohc_exit_n_i1b,
  output logic [2:0]  ohc_state,
  // microprogrammed control unit
  input  logic              upc_rst_n,
  input  logic [UOPW-1:0]   upc_opcode,
  input  logic              upc_flag_zero,
  input  logic              upc_flag_ovf,
  input  logic              upc_flag_ind,
  output logic [UINT_W-1:0] upc_int_ctrl,
  output logic [UBUS_W-1:0] upc_bus_ctrl,
  output logic [UAW-1:0]    upc_cmiar,
  output logic [UOPW-1:0]   upc_op_reg,
  input  logic              upc_ucode_we,
  input  logic [UAW-1:0]    upc_ucode_addr,
  input  logic [UINT_W+UBUS_W+3+UAW-1:0] upc_ucode_data,
  // instruction length decoder
  input  logic [15:0]       ild_parcel,
  output logic [7:0]        ild_len_bits,
  output logic              ild_reserved
);

  riscv_single_cycle #(
    .RESET_PC   (RESET_PC),
    .IMEM_WORDS (IMEM_WORDS),
    .DMEM_WORDS (DMEM_WORDS)
  ) u_cpu (
    .clk,
    .rst_n          (cpu_rst_n),
    .imem_load_we   (cpu_imem_load_we),
    .imem_load_addr (cpu_imem_load_addr),
    .imem_load_data (cpu_imem_load_data),
    .pc             (cpu_pc),
    .instr          (cpu_instr),
    .illegal        (cpu_illegal)
  );

  onehot_fetch_cu u_ohc (
    .clk,
    .rst_n      (ohc_rst_n),
    .start      (ohc_start),
    .wait_i     (ohc_wait),
    .i1b        (ohc_i1b),
    .pca_ext    (ohc_pca_ext),
    .mr_ext     (ohc_mr_ext),
    .pc_inc_ext (ohc_pc_inc_ext),
    .pca        (ohc_pca),
    .mr         (ohc_mr),
    .wir1       (ohc_wir1),
    .pc_inc     (ohc_pc_inc),
    .exit_i1b   (ohc_exit_i1b),
    .exit_n_i1b (ohc_exit_n_i1b),
    .state      (ohc_state)
  );

  microprog_cu #(
    .AW (UAW), .OPW (UOPW), .INT_W (UINT_W), .BUS_W (UBUS_W)
  ) u_upc (
    .clk,
    .rst_n      (upc_rst_n),
    .opcode_in  (upc_opcode),
    .flag_zero  (upc_flag_zero),
    .flag_ovf   (upc_flag_ovf),
    .flag_ind   (upc_flag_ind),
    .int_ctrl   (upc_int_ctrl),
    .bus_ctrl   (upc_bus_ctrl),
    .cmiar      (upc_cmiar),
    .op_reg     (upc_op_reg),
    .ucode_we   (upc_ucode_we),
    .ucode_addr (upc_ucode_addr),
    .ucode_data (upc_ucode_data)
  );

  insn_length_decoder u_ild (
    .parcel   (ild_parcel),
    .len_bits (ild_len_bits),
    .reserved (ild_reserved)
  );

endmodule
