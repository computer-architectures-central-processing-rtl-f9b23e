// tb_pc_reg - self-checking test of the program counter register: the reset
// value, loading PC' at each rising edge and not before it.
module tb_pc_reg;
  logic        clk = 0, rst_n = 0;
  logic [31:0] pc_next = 0, pc;
  int checks = 0, failures = 0;

  pc_reg #(.XLEN(32), .RESET_PC(32'h0000_0200)) dut (.clk, .rst_n, .pc_next, .pc);

  always #5 clk = ~clk;

  task automatic expect_pc(input logic [31:0] e, input string what);
    checks++;
    if (pc !== e) begin
      failures++;
      $display("FAIL %s: pc=%h exp=%h", what, pc, e);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_next = 32'h1234_5678;
    @(negedge clk);
    expect_pc(32'h0000_0200, "reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] v;
      v = $urandom;
      @(negedge clk);
      pc_next = v;
      #1 checks++;
      if (pc === v && i > 0) begin failures++; $display("FAIL pc followed PC' before the edge"); end
      @(negedge clk);
      expect_pc(v, "load");
    end
    rst_n = 0;
    @(negedge clk);
    expect_pc(32'h0000_0200, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
