// tb_onehot_fetch_cu - self-checking test of the one-flip-flop-per-state
// fetch sequence. A start token is sent repeatedly with random WAIT lengths
// and random I1B; every clock the state and all control outputs are compared
// with the state diagram (M1: PCA; M2: PCA MR WIR1, held while WAIT; M3:
// PC INC, leave on I1B / not I1B). The *_ext inputs are toggled to check
// that they only OR into their lines. The number of clocks per fetch is
// checked: 1 (M1) + 1 + waits (M2) + 1 (M3).
module tb_onehot_fetch_cu;
  logic clk = 0, rst_n = 0;
  logic start = 0, wait_i = 0, i1b = 0, pca_ext = 0, mr_ext = 0, pc_inc_ext = 0;
  logic pca, mr, wir1, pc_inc, exit_i1b, exit_n_i1b;
  logic [2:0] state;
  int checks = 0, failures = 0;
  int n_wait = 0, n_i1b = 0, n_n_i1b = 0;

  onehot_fetch_cu dut (.clk, .rst_n, .start, .wait_i, .i1b, .pca_ext, .mr_ext, .pc_inc_ext,
                       .pca, .mr, .wir1, .pc_inc, .exit_i1b, .exit_n_i1b, .state);

  always #5 clk = ~clk;

  typedef enum {S_IDLE, S_M1, S_M2, S_M3} st_e;

  task automatic expect_state(input st_e s);
    logic [2:0] e_state;
    logic e_pca, e_mr, e_wir1, e_inc, e_x1, e_xn;
    e_state = (s == S_M1) ? 3'b001 : (s == S_M2) ? 3'b010 : (s == S_M3) ? 3'b100 : 3'b000;
    e_pca  = (s == S_M1) || (s == S_M2) || pca_ext;
    e_mr   = (s == S_M2) || mr_ext;
    e_wir1 = (s == S_M2);
    e_inc  = (s == S_M3) || pc_inc_ext;
    e_x1   = (s == S_M3) && i1b;
    e_xn   = (s == S_M3) && !i1b;
    #1;
    checks++;
    if ({state, pca, mr, wir1, pc_inc, exit_i1b, exit_n_i1b} !== {e_state, e_pca, e_mr, e_wir1, e_inc, e_x1, e_xn}) begin
      failures++;
      $display("FAIL in %s: state=%b pca=%b mr=%b wir1=%b inc=%b x1=%b xn=%b", s.name(), state, pca, mr, wir1, pc_inc, exit_i1b, exit_n_i1b);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    expect_state(S_IDLE);
    for (int f = 0; f < 200; f++) begin
      int waits, clocks;
      waits  = (f % 3 == 0) ? 0 : int'($urandom % 5);
      clocks = 0;
      pca_ext = ($urandom % 8) == 0; mr_ext = ($urandom % 8) == 0; pc_inc_ext = ($urandom % 8) == 0;
      start = 1;
      @(negedge clk);
      start = 0;
      expect_state(S_M1); clocks++;
      wait_i = 1'($urandom % 2);  // ignored in M1
      @(negedge clk);
      for (int w = 0; w < waits; w++) begin
        wait_i = 1;
        expect_state(S_M2); clocks++; n_wait++;
        @(negedge clk);
      end
      wait_i = 0;
      expect_state(S_M2); clocks++;  // the cycle WAIT is low
      i1b = 1'($urandom % 2);
      @(negedge clk);
      expect_state(S_M3); clocks++;
      if (i1b) n_i1b++; else n_n_i1b++;
      checks++;
      if (clocks != waits + 3) begin failures++; $display("FAIL fetch took %0d clocks", clocks); end
      @(negedge clk);
      expect_state(S_IDLE);
    end
    checks++;
    if (n_wait == 0 || n_i1b == 0 || n_n_i1b == 0) begin failures++; $display("FAIL a path was never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
