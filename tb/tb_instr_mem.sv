// tb_instr_mem - self-checking test of the instruction memory: a program is
// written through the load port and read back combinationally at every word
// address; upper address bits and the byte offset are ignored.
module tb_instr_mem;
  localparam int unsigned WORDS = 1024;
  logic        clk = 0, load_we = 0;
  logic [31:0] a = 0, rd, load_addr = 0, load_data = 0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk, .a, .rd, .load_we, .load_addr, .load_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      model[i]  = $urandom;
      load_we   = 1;
      load_addr = 32'(i) << 2;
      load_data = model[i];
    end
    @(negedge clk);
    load_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      a = (32'(i) << 2) | 32'($urandom % 4) | (32'($urandom % 8) << 12);
      #1;
      checks++;
      if (rd !== model[i]) begin
        failures++;
        $display("FAIL a=%h rd=%h exp=%h", a, rd, model[i]);
      end
    end
    // a write with load_we = 0 changes nothing
    @(negedge clk);
    load_addr = 32'h10; load_data = ~model[4];
    @(negedge clk);
    a = 32'h10; #1;
    checks++;
    if (rd !== model[4]) begin failures++; $display("FAIL write without load_we"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
