// Data-path protected processor pipeline skeleton (micro-rollback).
//
// A chain of NREG shadow-protected inter-stage registers (IF/ID, ID/EX,
// EX/ME, ME/WB for a five-stage pipeline) together with the rollback control.
// The combinational stage logic is not part of this module: input `d[0]` is
// the fetch-stage output, `d[i]` (i>0) is the output of the stage that sits
// between register i-1 and register i and is computed from `q[i-1]`, and
// `q[NREG-1]` feeds the write-back stage. `hold` and `retry` are also given
// to the fetch stage: during hold it keeps its state, during retry it
// presents the output it produced one cycle before the fault (a fetch PC
// kept in a dp_shadow_reg behaves that way).
//
// Timing: a fault captured at edge t is flagged during cycle t..t+1 (hold),
// the stages recompute from history during t+1..t+2 (retry), and at edge t+2
// all registers hold the values edge t should have produced: two cycles
// penalty. `commit` marks the cycles in which q[NREG-1] is to be consumed by
// write-back.
//
// The structure follows the protected pipeline figure of the document; the
// generic stage interface is this design's own, because the processor's
// stage logic is not part of the design.
module dp_protected_pipeline #(
  parameter int unsigned NREG  = 4,
  parameter int unsigned W     = 32,
  parameter int unsigned CNT_W = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NREG-1:0][W-1:0]   d,
  input  logic [NREG-1:0][W-1:0]   inj_main,
  input  logic [NREG-1:0][W-1:0]   inj_shadow,
  output logic [NREG-1:0][W-1:0]   q,
  output logic [NREG-1:0]          err_vec,
  output logic                     hold,
  output logic                     retry,
  output logic                     commit,
  output logic [CNT_W-1:0]         rollbacks
);

  logic global_err;
  logic [NREG-1:0][W-1:0] q_main_unused;

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    dp_shadow_reg #(.W(W)) u_reg (
      .clk       (clk),
      .rst_n     (rst_n),
      .hold      (hold),
      .retry     (retry),
      .d         (d[i]),
      .inj_main  (inj_main[i]),
      .inj_shadow(inj_shadow[i]),
      .q         (q[i]),
      .q_main    (q_main_unused[i]),
      .err       (err_vec[i])
    );
  end

  dp_pipeline_ctrl #(.NREG(NREG), .CNT_W(CNT_W)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .err_vec   (err_vec),
    .global_err(global_err),
    .hold      (hold),
    .retry     (retry),
    .commit    (commit),
    .rollbacks (rollbacks)
  );

endmodule
