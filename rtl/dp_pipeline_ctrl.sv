// Pipeline control extension for micro-rollback.
//
// Collects the error flags of all shadow-protected pipeline registers, ORs
// them into one global error and sequences the rollback. In the cycle in
// which the global error is seen (detection cycle) `hold` freezes every
// protected register and the fetch stage. In the following cycle (correction
// cycle) `retry` switches every stage input to its history register, so all
// stages recompute the state that the faulty edge should have produced. The
// pipeline thus loses exactly two cycles per detected error, wherever the
// error occurred.
//
// Interface and timing:
//   err_vec - error flags of the NREG protected registers.
//   hold    - combinational, high in the detection cycle.
//   retry   - registered, high in the correction cycle.
//   commit  - low during hold and retry: the value at the pipeline output is
//             not to be consumed (it is either faulty or already consumed).
//   rollbacks - number of rollbacks performed (saturating).
// Error flags are ignored while a rollback is in progress, since the faulty
// value still sits in the held registers; an error found at the correction
// edge starts a new rollback.
//
// The document gives the OR of the error signals, the hold and retry signals
// and the two-cycle penalty; the two-state sequencer is this design's own.
module dp_pipeline_ctrl #(
  parameter int unsigned NREG  = 4,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREG-1:0]  err_vec,
  output logic             global_err,
  output logic             hold,
  output logic             retry,
  output logic             commit,
  output logic [CNT_W-1:0] rollbacks
);

  typedef enum logic {S_RUN, S_RETRY} state_e;
  state_e state_q;

  assign global_err = |err_vec;
  assign hold       = (state_q == S_RUN) && global_err;
  assign retry      = (state_q == S_RETRY);
  assign commit     = !hold && !retry;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_RUN;
      rollbacks <= '0;
    end else begin
      unique case (state_q)
        S_RUN: if (global_err) begin
          state_q <= S_RETRY;
          if (rollbacks != '1) rollbacks <= rollbacks + 1'b1;
        end
        S_RETRY: state_q <= S_RUN;
        default: state_q <= S_RUN;
      endcase
    end
  end

endmodule
