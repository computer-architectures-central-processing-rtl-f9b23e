// onehot_fetch_cu - "one flip-flop per state" hardwired control unit,
// instruction-fetch fragment.
//
// Each state of the control sequence is one flip-flop; exactly one of them
// holds a 1 while the sequence runs, and the token moves along the chain:
//   M1 (PCA)            : put the PC on the address bus, go to M2
//   M2 (PCA, MR, WIR1)  : memory read, write IR byte 1; stay while WAIT = 1
//   M3 (PC INC)         : increment the PC, then leave the fragment:
//                         exit_i1b if the instruction has one byte (I1B),
//                         exit_n_i1b otherwise (more bytes to fetch).
// Control outputs are ORs of the states that assert them; the *_ext inputs
// are the other states of a complete control unit that drive the same lines.
// States, outputs and transitions are those of the lecture's example; the
// start input, the exits as ports and the synchronous active-low reset
// (all flip-flops cleared, no token) are this design's framing of the
// fragment. Timing: one state per clock, the outputs are combinational
// from the state flip-flops (Moore).
module onehot_fetch_cu (
  input  logic clk,
  input  logic rst_n,
  input  logic start,       // token into M1 (from the previous state)
  input  logic wait_i,      // WAIT: memory not ready
  input  logic i1b,         // I1B: one-byte instruction
  input  logic pca_ext,     // PCA requested by other states
  input  logic mr_ext,      // MR requested by other states
  input  logic pc_inc_ext,  // PC INC requested by other states
  output logic pca,
  output logic mr,
  output logic wir1,
  output logic pc_inc,
  output logic exit_i1b,    // token leaves M3 along I1B
  output logic exit_n_i1b,  // token leaves M3 along not I1B
  output logic [2:0] state  // {M3, M2, M1}
);

  logic m1, m2, m3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m1 <= 1'b0;
      m2 <= 1'b0;
      m3 <= 1'b0;
    end else begin
      m1 <= start;
      m2 <= m1 | (m2 & wait_i);
      m3 <= m2 & ~wait_i;
    end
  end

  assign pca        = m1 | m2 | pca_ext;
  assign mr         = m2 | mr_ext;
  assign wir1       = m2;
  assign pc_inc     = m3 | pc_inc_ext;
  assign exit_i1b   = m3 & i1b;
  assign exit_n_i1b = m3 & ~i1b;
  assign state      = {m3, m2, m1};

  // the token is never duplicated: at most one state flip-flop is set
  a_one_token: assert property (@(posedge clk) disable iff (!rst_n) $onehot0({m3, m2, m1}));

endmodule
