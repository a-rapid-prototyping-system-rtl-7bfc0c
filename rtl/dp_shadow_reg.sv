// Shadow-protected pipeline register with history, for micro-rollback.
//
// One inter-stage pipeline register of the data-path protection scheme.
// Three registers sit side by side: the main register, which feeds the
// next stage; a shadow register, which samples the same stage output
// independently; and a history register, which keeps the value the main
// register held one cycle earlier. A bitwise XOR of main and shadow, reduced
// by OR, gives the register's error flag one cycle after the faulty capture
// (detection latency of one clock). A 2:1 multiplexer in front of the next
// stage selects the history value while `retry` is high, so the next stage
// recomputes from the last state that was known to be good.
//
// Interface and timing:
//   hold  - main, shadow and history keep their value (the detection cycle).
//   retry - the output multiplexer selects history; main and shadow capture
//           the recomputed stage output while history keeps its value.
//   inj_main / inj_shadow - fault-injection masks XORed into the inputs of
//           the main and the shadow register (the emulation multiplexers
//           that model single-event transients and timing errors).
//
// Following the document: main/shadow/history structure, XOR/OR compare,
// retry multiplexer, one-cycle detection. Own choices: the shadow register
// is clocked by the same edge as the main register (on an FPGA the delayed
// shadow clock cannot be built, so a late-arriving or transient value is
// emulated by injecting into the main path only), and reset clears all three.
module dp_shadow_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold,
  input  logic         retry,
  input  logic [W-1:0] d,
  input  logic [W-1:0] inj_main,
  input  logic [W-1:0] inj_shadow,
  output logic [W-1:0] q,
  output logic [W-1:0] q_main,
  output logic         err
);

  logic [W-1:0] main_q, shadow_q, hist_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_q   <= '0;
      shadow_q <= '0;
      hist_q   <= '0;
    end else if (!hold) begin
      main_q   <= d ^ inj_main;
      shadow_q <= d ^ inj_shadow;
      if (!retry) hist_q <= main_q;
    end
  end

  assign err    = |(main_q ^ shadow_q);
  assign q      = retry ? hist_q : main_q;
  assign q_main = main_q;

endmodule
