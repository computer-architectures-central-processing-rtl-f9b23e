// tb_alu - self-checking test of the ALU: directed corner cases and random
// operands for every operation, checked against a reference model, plus the
// Zero flag.
module tb_alu;
  import rv_pkg::*;

  logic [31:0] a, b, y;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.W(32)) dut (.src_a(a), .src_b(b), .alu_control(op), .alu_out(y), .zero);

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x + (~z) + 32'd1;
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_SLT: begin
        // signed compare by sign bits, then magnitude
        if (x[31] != z[31]) return {31'b0, x[31]};
        return {31'b0, x < z};
      end
      default: return '0;
    endcase
  endfunction

  task automatic check(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = model(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h zero=%b", o.name(), x, z, y, e, zero);
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
    alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    // corner cases
    check(ALU_SLT, 32'h8000_0000, 32'h0000_0001);  // -2^31 < 1
    check(ALU_SLT, 32'h0000_0001, 32'h8000_0000);
    check(ALU_SLT, 32'hFFFF_FFFF, 32'h0000_0000);  // -1 < 0
    check(ALU_SLT, 32'h0000_0005, 32'h0000_0005);
    check(ALU_SUB, 32'h1234_5678, 32'h1234_5678);  // zero flag
    check(ALU_ADD, 32'hFFFF_FFFF, 32'h0000_0001);  // wraps to zero
    check(ALU_ADD, 32'd157, 32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      check(ops[i % 5], $urandom, (i % 7 == 0) ? 32'($urandom % 4) : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
