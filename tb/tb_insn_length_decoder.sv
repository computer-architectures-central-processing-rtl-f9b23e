// tb_insn_length_decoder - self-checking test of the RISC-V instruction
// length decoder: all 65536 parcels are compared with a reference that
// matches each length pattern as a bit string with don't-cares, plus the
// first parcels of known 32-bit words (lw 0x40002103, add 0x00310233) and of
// one compressed instruction.
module tb_insn_length_decoder;
  logic [15:0] parcel;
  logic [7:0]  len_bits;
  logic        reserved;
  int checks = 0, failures = 0;
  int count [int];

  insn_length_decoder dut (.parcel, .len_bits, .reserved);

  function automatic int ref_len(input logic [15:0] p);
    if (!(p ==? 16'b????????_??????11)) return 16;     // aa != 11
    if (!(p ==? 16'b????????_???111_11)) return 32;    // bbb != 111
    if (p ==? 16'b????????_??011111) return 48;
    if (p ==? 16'b????????_?0111111) return 64;
    if (p ==? 16'b?111????_?1111111) return -1;        // reserved
    return 80 + 16 * int'(p[14:12]);
  endfunction

  task automatic check(input logic [15:0] p, input int e);
    parcel = p;
    #1;
    checks++;
    if ((e < 0 && !(reserved && len_bits == 0)) || (e >= 0 && (reserved || int'(len_bits) != e))) begin
      failures++;
      $display("FAIL parcel=%b len=%0d reserved=%b exp=%0d", p, len_bits, reserved, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h2103, 32);  // lw x2, 0x400(x0)
    check(16'h0233, 32);  // add x4, x2, x3
    check(16'h4501, 16);  // a compressed instruction (aa = 01)
    for (int i = 0; i < 65536; i++) begin
      int e;
      e = ref_len(16'(i));
      count[e] = count.exists(e) ? count[e] + 1 : 1;
      check(16'(i), e);
    end
    // every length class appears
    foreach (count[k]) $display("length %0d: %0d parcels", k, count[k]);
    checks++;
    if (count.num() != 12) begin failures++; $display("FAIL %0d length classes", count.num()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
