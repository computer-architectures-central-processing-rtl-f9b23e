// tb_imm_decode - self-checking test of the immediate decoder: the
// immediates of known instruction words (lw x2,0x400(x0); sw x2,0x404(x5);
// the beq and bne of the log2 example) and random words in all five formats,
// each compared with a reference that sign-extends the concatenated fields.
module tb_imm_decode;
  import rv_pkg::*;

  logic [31:0] instr, imm;
  imm_fmt_e    sel;
  int checks = 0, failures = 0;

  imm_decode dut (.instr, .imm_sel(sel), .imm);

  function automatic logic [31:0] model(input imm_fmt_e f, input logic [31:0] w);
    case (f)
      IMM_I: return 32'($signed(w[31:20]));
      IMM_S: return 32'($signed({w[31:25], w[11:7]}));
      IMM_B: return 32'($signed({w[31], w[7], w[30:25], w[11:8], 1'b0}));
      IMM_U: return {w[31:12], 12'h000};
      IMM_J: return 32'($signed({w[31], w[19:12], w[20], w[30:21], 1'b0}));
      default: return '0;
    endcase
  endfunction

  task automatic check(input imm_fmt_e f, input logic [31:0] w, input logic [31:0] e);
    sel = f; instr = w;
    #1;
    checks++;
    if (imm !== e) begin
      failures++;
      $display("FAIL fmt=%s instr=%h imm=%h exp=%h", f.name(), w, imm, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    imm_fmt_e fmts[5] = '{IMM_I, IMM_S, IMM_B, IMM_U, IMM_J};
    check(IMM_I, 32'h4000_2103, 32'h0000_0400);  // lw x2, 0x400(x0)
    check(IMM_S, 32'h4022_a223, 32'h0000_0404);  // sw x2, 0x404(x5)
    check(IMM_B, 32'h0005_0863, 32'h0000_0010);  // beq at 0x208 to 0x218
    check(IMM_B, 32'hfe05_1ce3, 32'hFFFF_FFF8);  // bne at 0x214 to 0x20c
    check(IMM_I, 32'hfff0_0313, 32'hFFFF_FFFF);  // addi x6, x0, -1
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] w;
      w = $urandom;
      check(fmts[i % 5], w, model(fmts[i % 5], w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
