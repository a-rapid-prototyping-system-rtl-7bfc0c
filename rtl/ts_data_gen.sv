// Information-bit generator of the Turbo slave.
//
// Produces the pseudo-random information bits of the simulated
// transmissions: a 31-bit maximal-length LFSR (x^31 + x^28 + 1, the PRBS31
// sequence) emits one bit per cycle while `en` is high. `load` sets a new
// non-zero state from `seed` (a zero seed is replaced by 1), so runs can be
// repeated or varied.
//
// Interface and timing: `bit_out` is the LFSR's oldest bit, valid in the
// cycle in which `en` is high; the next bit follows one cycle later.
//
// The document names a data generator in the Turbo slave; the PRBS31
// sequence is this design's own choice.
module ts_data_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [30:0] seed,
  input  logic        en,
  output logic        bit_out
);

  logic [30:0] lfsr_q;

  assign bit_out = lfsr_q[30];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     lfsr_q <= 31'h1;
    else if (load)  lfsr_q <= (seed == '0) ? 31'h1 : seed;
    else if (en)    lfsr_q <= {lfsr_q[29:0], lfsr_q[30] ^ lfsr_q[27]};
  end

endmodule
