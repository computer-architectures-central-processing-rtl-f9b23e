// tb_reg_file - self-checking test of the register file: reset clears all
// registers, random writes are compared with a model on both read ports,
// writes with WE3 = 0 and writes to x0 have no effect, and a write becomes
// visible only after the rising edge.
module tb_reg_file;
  logic        clk = 0, rst_n = 0, we3 = 0;
  logic [4:0]  a1 = 0, a2 = 0, a3 = 0;
  logic [31:0] wd3 = 0, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  reg_file #(.XLEN(32), .NREGS(32)) dut (.clk, .rst_n, .we3, .a1, .a2, .a3, .wd3, .rd1, .rd2);

  always #5 clk = ~clk;

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      a1 = 5'(r); a2 = 5'(31 - r);
      #1;
      checks++;
      if (rd1 !== model[r] || rd2 !== model[31 - r]) begin
        failures++;
        $display("FAIL read x%0d=%h (exp %h), x%0d=%h (exp %h)", r, rd1, model[r], 31 - r, rd2, model[31 - r]);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    check_reads();
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we3 = ($urandom % 4) != 0;
      a3  = 5'($urandom);
      wd3 = $urandom;
      // before the edge the old value is still read
      a1 = a3;
      #1;
      checks++;
      if (rd1 !== model[a3]) begin
        failures++;
        $display("FAIL x%0d changed before the clock edge", a3);
      end
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
      @(negedge clk);
      we3 = 0;
      if (i % 50 == 0) check_reads();
      else begin
        a1 = a3; a2 = 5'($urandom);
        #1;
        checks++;
        if (rd1 !== model[a1] || rd2 !== model[a2]) begin
          failures++;
          $display("FAIL after write x%0d=%h exp %h", a1, rd1, model[a1]);
        end
      end
    end
    // explicit write to x0
    @(negedge clk); we3 = 1; a3 = 0; wd3 = 32'hDEAD_BEEF;
    @(negedge clk); we3 = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
