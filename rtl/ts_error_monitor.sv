// Error monitor of the Turbo slave.
//
// Compares the decoded bits returned by the decoder with the transmitted
// information bits, one 32-bit word at a time, and keeps the statistics of
// a Monte Carlo run: number of frames, bit errors and frame errors (a frame
// with at least one wrong bit). `last` marks the final word of a frame.
// `clear` resets the statistics.
//
// Interface and timing: one comparison per cycle with `valid`; counters
// update at the clock edge and saturate.
//
// The document names the error monitor and its comparison of sink and
// source; word width and counters are this design's own.
module ts_error_monitor #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic             last,
  input  logic [31:0]      src_word,
  input  logic [31:0]      dec_word,
  output logic [CNT_W-1:0] frames,
  output logic [CNT_W-1:0] bit_errors,
  output logic [CNT_W-1:0] frame_errors
);

  logic        frame_bad_q;
  logic [5:0]  nerr;
  logic        word_bad;

  assign nerr     = 6'($countones(src_word ^ dec_word));
  assign word_bad = (nerr != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frames       <= '0;
      bit_errors   <= '0;
      frame_errors <= '0;
      frame_bad_q  <= 1'b0;
    end else if (clear) begin
      frames       <= '0;
      bit_errors   <= '0;
      frame_errors <= '0;
      frame_bad_q  <= 1'b0;
    end else if (valid) begin
      if (bit_errors <= '1 - CNT_W'(nerr)) bit_errors <= bit_errors + CNT_W'(nerr);
      else                                 bit_errors <= '1;
      if (last) begin
        frame_bad_q <= 1'b0;
        if (frames != '1) frames <= frames + 1'b1;
        if ((frame_bad_q || word_bad) && frame_errors != '1) frame_errors <= frame_errors + 1'b1;
      end else begin
        frame_bad_q <= frame_bad_q || word_bad;
      end
    end
  end

endmodule
