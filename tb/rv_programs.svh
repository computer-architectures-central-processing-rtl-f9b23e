// rv_programs.svh - test programs for the single-cycle CPU, as lists of
// machine words built with the rv_asm encoders; included inside a testbench
// module after rv_asm.svh.
//
// directed(): one or more of every instruction of the subset, both outcomes
//   of beq, forward and backward jumps, loads and stores at 0x400/0x404.
// log2(n): floor(log2(n)) for n > 0 by doubling p until p > n, written with
//   the subset only (it has no shift and no bne); result in a0 (x10).
// Both end with ebreak, which the CPU does not implement and flags illegal.

  typedef logic [31:0] prog_t [$];

  function automatic prog_t directed();
    prog_t p;
    p.push_back(addi(1, 0, 157));        // 0x200
    p.push_back(addi(2, 0, -1));         // 0x204
    p.push_back(add (3, 1, 2));          // 0x208
    p.push_back(sub (4, 1, 2));          // 0x20c
    p.push_back(and_(5, 1, 2));          // 0x210
    p.push_back(or_ (6, 0, 1));          // 0x214
    p.push_back(slt (7, 2, 1));          // 0x218
    p.push_back(slt (8, 1, 2));          // 0x21c
    p.push_back(ori (9, 0, 12'h0f0));    // 0x220
    p.push_back(andi(10, 1, 15));        // 0x224
    p.push_back(lui (11, 20'h12345));    // 0x228
    p.push_back(auipc(12, 20'h00001));   // 0x22c
    p.push_back(sw  (1, 12'h400, 0));    // 0x230
    p.push_back(sw  (11, 12'h404, 0));   // 0x234
    p.push_back(lw  (13, 12'h400, 0));   // 0x238
    p.push_back(addi(14, 0, 4));         // 0x23c
    p.push_back(lw  (15, 12'h400, 14));  // 0x240
    p.push_back(beq (1, 2, 8));          // 0x244 not taken
    p.push_back(addi(16, 0, 1));         // 0x248
    p.push_back(beq (1, 6, 8));          // 0x24c taken
    p.push_back(addi(16, 0, 99));        // 0x250 skipped
    p.push_back(jal (17, 12));           // 0x254 -> 0x260
    p.push_back(addi(18, 0, 99));        // 0x258 skipped
    p.push_back(addi(18, 0, 98));        // 0x25c skipped
    p.push_back(auipc(19, 20'h0));       // 0x260
    p.push_back(jalr(20, 19, 17));       // 0x264 -> 0x270 (bit 0 cleared)
    p.push_back(addi(21, 0, 99));        // 0x268 skipped
    p.push_back(addi(21, 0, 98));        // 0x26c skipped
    p.push_back(addi(0, 0, 5));          // 0x270 x0 stays zero
    p.push_back(addi(22, 0, 3));         // 0x274 loop counter
    p.push_back(addi(23, 23, 7));        // 0x278 loop body
    p.push_back(addi(22, 22, -1));       // 0x27c
    p.push_back(beq (22, 0, 8));         // 0x280 exit when zero
    p.push_back(jal (0, -12));           // 0x284 back to 0x278
    p.push_back(sw  (23, -4, 14));       // 0x288 store at 0x000
    p.push_back(lw  (24, 0, 0));         // 0x28c
    p.push_back(EBREAK);                 // 0x290
    return p;
  endfunction

  function automatic prog_t log2(input int n);
    prog_t p;
    p.push_back(addi(10, 0, n));         // a0 = n
    p.push_back(addi(6, 0, -1));         // t1 = y = -1
    p.push_back(addi(7, 0, 1));          // t2 = p = 1
    p.push_back(slt (28, 10, 7));        // loop: t3 = (n < p)
    p.push_back(beq (28, 0, 8));         //   continue while p <= n
    p.push_back(jal (0, 16));            //   -> done
    p.push_back(add (7, 7, 7));          //   p = p + p
    p.push_back(addi(6, 6, 1));          //   y = y + 1
    p.push_back(jal (0, -20));           //   -> loop
    p.push_back(addi(10, 6, 0));         // done: a0 = y
    p.push_back(EBREAK);
    return p;
  endfunction
