// LFSR-driven fault injector for W bit lines.
//
// Every bit line has its own 51-bit linear feedback shift register
// (x^51 + x^6 + x^3 + x + 1), started from a different non-zero seed, so
// that the faults on different lines are statistically independent. Each
// register advances THR_W steps per clock, and the line is hit in a cycle
// when the low THR_W bits of its register are below the run-time threshold
// `thr`: the injected error rate per line and cycle is thr / 2^THR_W
// (thr = 0 injects nothing). A hit either inverts the line (mode 0, a
// transient pulse or upset) or passes the line's value from the previous
// cycle (mode 1, a late signal, i.e. a timing error).
//
// Interface and timing: `dout` is combinational from `din` and the
// registers; `mask` shows which lines are hit this cycle; `hits` counts
// cycles with at least one hit (saturating). `en` low passes din unchanged
// and freezes the registers.
//
// The per-line LFSR of length 51, the run-time rate and flip or delay
// injection follow the document. The feedback polynomial, the seeds, the
// threshold compare and the 16-bit rate resolution are this design's own.
module err_injector #(
  parameter int unsigned W     = 33,
  parameter int unsigned THR_W = 16,
  parameter logic [50:0] SEED  = 51'h2_5A5A_C3C3_1234,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [THR_W-1:0] thr,
  input  logic             delay_mode,
  input  logic [W-1:0]     din,
  output logic [W-1:0]     dout,
  output logic [W-1:0]     mask,
  output logic [CNT_W-1:0] hits
);

  localparam int unsigned L = 51;

  logic [L-1:0] lfsr_q [W];
  logic [L-1:0] lfsr_d [W];
  logic [W-1:0] din_q;

  function automatic logic [L-1:0] step(input logic [L-1:0] s);
    // Fibonacci form, taps 51, 6, 3, 1
    return {s[L-2:0], s[50] ^ s[5] ^ s[2] ^ s[0]};
  endfunction

  function automatic logic [L-1:0] seed_of(input int unsigned i);
    logic [L-1:0] s;
    s = SEED ^ (L'(i) * 51'h0_0000_9E37_79B9) ^ (L'(i) << 29);
    return (s == '0) ? L'(1) : s;
  endfunction

  always_comb begin
    for (int i = 0; i < W; i++) begin
      lfsr_d[i] = lfsr_q[i];
      for (int k = 0; k < THR_W; k++) lfsr_d[i] = step(lfsr_d[i]);
      mask[i] = en && (lfsr_q[i][THR_W-1:0] < thr);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) lfsr_q[i] <= seed_of(i);
      din_q <= '0;
      hits  <= '0;
    end else begin
      din_q <= din;
      if (en) begin
        for (int i = 0; i < W; i++) lfsr_q[i] <= lfsr_d[i];
        if (|mask && hits != '1) hits <= hits + 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      dout[i] = mask[i] ? (delay_mode ? din_q[i] : ~din[i]) : din[i];
  end

endmodule
