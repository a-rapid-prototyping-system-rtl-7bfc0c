// EDC unit of a bus master.
//
// Sits between a master and the protected data bus. It encodes the write
// payload (data encoder), decodes and corrects read data (data decoder),
// decodes the Hamming-coded protection mode of the current data phase
// (mode decoder), and encodes the modes the master stores into the
// protection mode RAM (mode encoder). A phase bit toggles every cycle and is
// used by both data coders (phase shifting, see edc_data_enc).
//
// Read ARQ: in mode 0, a read word with a parity error makes the unit raise
// `arq` in the same cycle. The bus routes it to the slave, whose EDC unit
// holds HREADY low for one cycle and drives the word again; the master takes
// it one cycle later. At most ARQ_MAX retransmissions are asked for one
// data phase; after that the word is taken with `rstatus.detected` set.
//
// Interface and timing:
//   dp_mine / dp_write - this master owns the current data phase, and its
//                        direction; hready ends the data phase.
//   rvalid             - read data in rpayload/rstatus taken this cycle.
//   mode_set           - write mode_set_val for segment mode_set_seg; the
//                        bus performs it in this master's address phase.
// Counters saturate.
//
// The units, their parts and the ARQ with one extra cycle follow the
// document; the retransmission limit and the counters are this design's own.
module edc_master
  import edc_pkg::*;
#(
  parameter int unsigned SEG_W       = 11,
  parameter int unsigned ARQ_MAX     = 3,
  parameter bit          PHASE_SHIFT = 1'b1,
  parameter int unsigned CNT_W       = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // master side
  input  logic [PAYLOAD_W-1:0] wpayload,
  output logic [PAYLOAD_W-1:0] rpayload,
  output edc_status_t          rstatus,
  output logic                 rvalid,
  input  logic                 mode_set,
  input  logic [SEG_W-1:0]     mode_set_seg,
  input  logic [MODE_W-1:0]    mode_set_val,
  output logic                 mode_we,
  output logic [SEG_W-1:0]     mode_wseg,
  output logic [MODE_CW_W-1:0] mode_wcw,
  // bus side
  input  logic                 dp_mine,
  input  logic                 dp_write,
  input  logic                 hready,
  input  logic [MODE_CW_W-1:0] prot_mode_cw,
  output logic [BUS_W-1:0]     hwdata,
  input  logic [BUS_W-1:0]     hrdata,
  output logic                 arq,
  // statistics
  output logic [MODE_W-1:0]    cur_mode,
  output logic [CNT_W-1:0]     cnt_corrected,
  output logic [CNT_W-1:0]     cnt_detected,
  output logic [CNT_W-1:0]     cnt_punctured,
  output logic [CNT_W-1:0]     cnt_arq,
  output logic [CNT_W-1:0]     cnt_mode_corrected
);

  logic        phase_q;
  logic        mode_corr;
  edc_status_t dec_status;
  logic [$clog2(ARQ_MAX+1)-1:0] arq_cnt_q;
  logic        rd_phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= 1'b0;
    else        phase_q <= ~phase_q;
  end

  edc_mode_dec u_mode_dec (
    .mode_cw  (prot_mode_cw),
    .mode     (cur_mode),
    .corrected(mode_corr)
  );

  edc_mode_enc u_mode_enc (
    .mode   (mode_set_val),
    .mode_cw(mode_wcw)
  );
  assign mode_we   = mode_set;
  assign mode_wseg = mode_set_seg;

  edc_data_enc #(.PHASE_SHIFT(PHASE_SHIFT)) u_data_enc (
    .mode   (cur_mode),
    .payload(wpayload),
    .phase  (phase_q),
    .bus    (hwdata)
  );

  edc_data_dec #(.PHASE_SHIFT(PHASE_SHIFT)) u_data_dec (
    .mode   (cur_mode),
    .bus    (hrdata),
    .phase  (phase_q),
    .payload(rpayload),
    .status (dec_status)
  );

  assign rd_phase = dp_mine && !dp_write;
  assign arq      = rd_phase && (cur_mode == MODE_PARITY_ARQ) && dec_status.detected
                    && (arq_cnt_q < ($bits(arq_cnt_q))'(ARQ_MAX));
  assign rvalid   = rd_phase && hready;
  assign rstatus  = dec_status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arq_cnt_q          <= '0;
      cnt_corrected      <= '0;
      cnt_detected       <= '0;
      cnt_punctured      <= '0;
      cnt_arq            <= '0;
      cnt_mode_corrected <= '0;
    end else begin
      if (hready)   arq_cnt_q <= '0;
      else if (arq) arq_cnt_q <= arq_cnt_q + 1'b1;
      if (arq && cnt_arq != '1) cnt_arq <= cnt_arq + 1'b1;
      if (rvalid) begin
        if (dec_status.corrected && cnt_corrected != '1) cnt_corrected <= cnt_corrected + 1'b1;
        if (dec_status.detected  && cnt_detected  != '1) cnt_detected  <= cnt_detected + 1'b1;
        if (dec_status.punctured && cnt_punctured != '1) cnt_punctured <= cnt_punctured + 1'b1;
      end
      if (dp_mine && hready && mode_corr && cnt_mode_corrected != '1)
        cnt_mode_corrected <= cnt_mode_corrected + 1'b1;
    end
  end

endmodule
