// tb_data_mem - self-checking test of the data memory: random word writes
// (WE = 1) and reads against a model, writes land only at the rising edge,
// WE = 0 leaves the contents unchanged.
module tb_data_mem;
  localparam int unsigned WORDS = 1024;
  logic        clk = 0, we = 0;
  logic [31:0] a = 0, wd = 0, rd;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk, .we, .a, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill so that every word is known
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      model[i] = $urandom;
      we = 1; a = 32'(i) << 2; wd = model[i];
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      int idx;
      idx = int'($urandom % WORDS);
      @(negedge clk);
      we = 1'($urandom % 2);
      a  = 32'(idx) << 2;
      wd = $urandom;
      #1;
      checks++;
      if (rd !== model[idx]) begin
        failures++;
        $display("FAIL before edge a=%h rd=%h exp=%h", a, rd, model[idx]);
      end
      @(posedge clk);
      if (we) model[idx] = wd;
      @(negedge clk);
      we = 0;
      #1;
      checks++;
      if (rd !== model[idx]) begin
        failures++;
        $display("FAIL after edge a=%h rd=%h exp=%h", a, rd, model[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
