// Turbo slave: hardware environment of the Turbo decoding experiment.
//
// Generates the test traffic of a Monte Carlo run of a channel decoder that
// runs in software on the processors. On a start command the data generator
// produces K information bits, which are kept in the source buffer and fed
// to the LTE Turbo encoder. The encoder's bit triples leave through the
// channel port (`chan_valid`, `chan_bits` = {parity 2, parity 1,
// systematic}) to the noise channel, whose 6-bit soft values come back
// through `chan_llr_*` and are stored in the soft-value buffer, one trellis
// step per word. The processors read the soft values over the bus, decode,
// and write the decoded bits back; the error monitor compares each written
// word with the source buffer and counts bit and frame errors.
//
// Bus interface (payload level, behind a slave EDC unit): the address is
// taken in the address phase (hsel and hready), the access happens in the
// data phase (a write when `wvalid` is high); the slave never inserts wait states. Address map (byte
// offsets inside the slave):
//   bit 13 set        soft-value word n = addr[12:2], n < K+4:
//                     bits [5:0] systematic, [11:6] parity 1, [17:12]
//                     parity 2, as 6-bit two's-complement values (the layout
//                     of the 4 x 6-bit protection modes)
//   bits 13:12 = 01   decoded-bit word n = addr[11:2], n < K/32 (write);
//                     bit b of word n is information bit 32n + b
//   otherwise, word addr[4:2]:
//     0  write: bit0 start a frame, bit1 clear statistics;
//        read : bit0 busy, bit1 soft values complete
//     1  write: seed of the data generator (applied at the next start)
//     2  frames   3  bit errors   4  frame errors   5  K
//
// The document names the unit and its parts (bus interface, data
// generator, Turbo encoder, channel, error monitor); the address map, the
// buffers and the sequencing are this design's own. The noise channel is an
// external core, reached through the channel port.
module ts_turbo_slave #(
  parameter int unsigned K = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  // bus, address phase
  input  logic                hsel,
  input  logic [31:0]         haddr,
  input  logic                hready,
  // bus, data phase
  input  logic [31:0]         wpayload,
  input  logic                wvalid,
  output logic [31:0]         rpayload,
  output logic                core_ready,
  // noise channel
  output logic                chan_valid,
  output logic [2:0]          chan_bits,
  input  logic                chan_llr_valid,
  input  logic [2:0][5:0]     chan_llr,
  // statistics
  output logic [31:0]         frames,
  output logic [31:0]         bit_errors,
  output logic [31:0]         frame_errors,
  output logic                llr_ready
);

  localparam int unsigned NLLR = K + 4;
  localparam int unsigned NSRC = K / 32;
  localparam int unsigned LW   = $clog2(NLLR + 1);
  localparam int unsigned GW   = $clog2(K + 1);

  logic [17:0] llr_mem [NLLR];
  logic [31:0] src_mem [NSRC];
  logic [31:0] a_q;
  logic [LW-1:0] llr_wr_q;
  logic [GW-1:0] gen_cnt_q;
  logic        gen_q;
  logic [30:0] seed_q;
  logic        seed_load_q;
  logic        gen_bit;
  logic        enc_busy, enc_valid, enc_sys, enc_p1, enc_p2, enc_last_unused;
  logic        wr_reg, wr_dec;
  logic [9:0]  dec_idx;

  // ------------------------------------------------ address phase capture
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               a_q <= '0;
    else if (hsel && hready)  a_q <= haddr;
  end

  assign core_ready    = 1'b1;
  assign wr_reg        = wvalid && (a_q[13:12] == 2'b00);
  assign wr_dec        = wvalid && (a_q[13:12] == 2'b01);
  assign dec_idx       = a_q[11:2];

  // ------------------------------------------- generator and encoder feed
  ts_data_gen u_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (seed_load_q),
    .seed   (seed_q),
    .en     (gen_q),
    .bit_out(gen_bit)
  );

  ts_turbo_enc #(.K(K)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (gen_q),
    .in_bit   (gen_bit),
    .busy     (enc_busy),
    .out_valid(enc_valid),
    .out_sys  (enc_sys),
    .out_p1   (enc_p1),
    .out_p2   (enc_p2),
    .out_last (enc_last_unused)
  );

  assign chan_valid = enc_valid;
  assign chan_bits  = {enc_p2, enc_p1, enc_sys};

  always_ff @(posedge clk) begin
    if (gen_q) src_mem[gen_cnt_q[GW-1:5]][gen_cnt_q[4:0]] <= gen_bit;
    if (chan_llr_valid && llr_wr_q < LW'(NLLR)) llr_mem[llr_wr_q] <= chan_llr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_q       <= 1'b0;
      gen_cnt_q   <= '0;
      llr_wr_q    <= '0;
      llr_ready   <= 1'b0;
      seed_q      <= 31'h1;
      seed_load_q <= 1'b0;
    end else begin
      seed_load_q <= 1'b0;
      if (wr_reg && a_q[4:2] == 3'd1) begin
        seed_q      <= wpayload[30:0];
        seed_load_q <= 1'b1;
      end
      if (wr_reg && a_q[4:2] == 3'd0 && wpayload[0] && !gen_q && !enc_busy) begin
        gen_q     <= 1'b1;
        gen_cnt_q <= '0;
        llr_wr_q  <= '0;
        llr_ready <= 1'b0;
      end else if (gen_q) begin
        if (gen_cnt_q == GW'(K - 1)) gen_q <= 1'b0;
        gen_cnt_q <= gen_cnt_q + 1'b1;
      end
      if (chan_llr_valid && llr_wr_q < LW'(NLLR)) begin
        llr_wr_q <= llr_wr_q + 1'b1;
        if (llr_wr_q == LW'(NLLR - 1)) llr_ready <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------- error monitor
  ts_error_monitor u_mon (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (wr_reg && a_q[4:2] == 3'd0 && wpayload[1]),
    .valid       (wr_dec && dec_idx < 10'(NSRC)),
    .last        (dec_idx == 10'(NSRC - 1)),
    .src_word    (src_mem[dec_idx[$clog2(NSRC)-1:0]]),
    .dec_word    (wpayload),
    .frames      (frames),
    .bit_errors  (bit_errors),
    .frame_errors(frame_errors)
  );

  // ------------------------------------------------------------- read data
  always_comb begin
    rpayload = '0;
    if (a_q[13]) begin
      if (a_q[12:2] < 11'(NLLR)) rpayload = {14'b0, llr_mem[a_q[12:2]]};
    end else if (a_q[12] == 1'b0) begin
      unique case (a_q[4:2])
        3'd0:    rpayload = {30'b0, llr_ready, gen_q || enc_busy};
        3'd1:    rpayload = {1'b0, seed_q};
        3'd2:    rpayload = frames;
        3'd3:    rpayload = bit_errors;
        3'd4:    rpayload = frame_errors;
        3'd5:    rpayload = 32'(K);
        default: rpayload = '0;
      endcase
    end
  end

endmodule
