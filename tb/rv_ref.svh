// rv_ref.svh - instruction-level reference model of the CPU's RV32I subset
// for the testbenches, included inside a testbench module. step() executes
// one instruction from the model's own copy of the program and data; the
// testbench compares the RTL with it after every clock (one instruction per
// clock) and at the end.

  class rv_model;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] imem [int];
    logic [31:0] dmem [int];
    bit          illegal;
    // how often each kind of event happened
    int n_branch_taken, n_branch_not_taken, n_jal, n_jalr, n_load, n_store, n_illegal, n_instr;

    function new(logic [31:0] reset_pc);
      foreach (x[i]) x[i] = '0;
      pc = reset_pc;
    endfunction

    function logic [31:0] fetch(logic [31:0] a);
      return imem.exists(int'(a >> 2)) ? imem[int'(a >> 2)] : 32'h0;
    endfunction

    function logic [31:0] load(logic [31:0] a);
      return dmem.exists(int'(a[11:2])) ? dmem[int'(a[11:2])] : 32'h0;
    endfunction

    function void step();
      logic [31:0] w, ia, ib, is, iu, ij, r1, r2, res, npc;
      logic [4:0]  rd;
      bit          wr;
      w  = fetch(pc);
      ia = {{20{w[31]}}, w[31:20]};
      is = {{20{w[31]}}, w[31:25], w[11:7]};
      ib = {{19{w[31]}}, w[31], w[7], w[30:25], w[11:8], 1'b0};
      iu = {w[31:12], 12'b0};
      ij = {{11{w[31]}}, w[31], w[19:12], w[20], w[30:21], 1'b0};
      r1 = x[w[19:15]];
      r2 = x[w[24:20]];
      rd = w[11:7];
      npc = pc + 4;
      wr = 0;
      res = '0;
      illegal = 0;
      n_instr++;
      case (w[6:0])
        7'h03: if (w[14:12] == 3'd2) begin res = load(r1 + ia); wr = 1; n_load++; end else illegal = 1;
        7'h23: if (w[14:12] == 3'd2) begin dmem[int'(((r1 + is) >> 2) & 32'h3ff)] = r2; n_store++; end else illegal = 1;
        7'h33: begin
          wr = 1;
          case ({w[31:25], w[14:12]})
            10'b0000000_000: res = r1 + r2;
            10'b0100000_000: res = r1 - r2;
            10'b0000000_010: res = ($signed(r1) < $signed(r2)) ? 32'd1 : 32'd0;
            10'b0000000_110: res = r1 | r2;
            10'b0000000_111: res = r1 & r2;
            default: begin wr = 0; illegal = 1; end
          endcase
        end
        7'h13: begin
          wr = 1;
          case (w[14:12])
            3'd0: res = r1 + ia;
            3'd6: res = r1 | ia;
            3'd7: res = r1 & ia;
            default: begin wr = 0; illegal = 1; end
          endcase
        end
        7'h63: if (w[14:12] == 3'd0) begin
                 if (r1 == r2) begin npc = pc + ib; n_branch_taken++; end
                 else n_branch_not_taken++;
               end else illegal = 1;
        7'h6f: begin res = pc + 4; wr = 1; npc = pc + ij; n_jal++; end
        7'h67: if (w[14:12] == 3'd0) begin res = pc + 4; wr = 1; npc = (r1 + ia) & ~32'd1; n_jalr++; end
               else illegal = 1;
        7'h37: begin res = iu; wr = 1; end
        7'h17: begin res = pc + iu; wr = 1; end
        default: illegal = 1;
      endcase
      if (illegal) n_illegal++;
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
    endfunction
  endclass

