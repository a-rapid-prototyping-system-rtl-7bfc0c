// EDC unit of a bus slave.
//
// Sits between a slave and the protected data bus. It decodes the
// Hamming-coded protection mode of the current data phase, decodes and
// corrects write data (data decoder) and encodes read data (data encoder).
// A phase bit toggles every cycle, in step with the masters' EDC units.
//
// ARQ: in mode 0 a write word with a parity error, or a read retransmission
// request `arq_in` from the master's EDC unit, pulls `hready_out` low for
// one cycle; the word is then sent again (the master keeps HWDATA, the slave
// keeps its read data while HREADY is low), costing one extra cycle. At
// most ARQ_MAX write retransmissions are asked for in one data phase; after
// that the word is taken with `wstatus.detected` set.
//
// Interface and timing:
//   dp_sel / dp_write - this slave owns the current data phase, direction.
//   core_ready        - the slave itself is ready (its HREADYOUT).
//   hready            - the bus HREADY (ends the data phase).
//   wvalid            - write payload taken this cycle.
// The unit, its parts and the one-cycle ARQ follow the document; the
// retransmission limit and counters are this design's own.
module edc_slave
  import edc_pkg::*;
#(
  parameter int unsigned ARQ_MAX     = 3,
  parameter bit          PHASE_SHIFT = 1'b1,
  parameter int unsigned CNT_W       = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // slave side
  input  logic [PAYLOAD_W-1:0] rpayload,
  input  logic                 core_ready,
  output logic [PAYLOAD_W-1:0] wpayload,
  output edc_status_t          wstatus,
  output logic                 wvalid,
  // bus side
  input  logic                 dp_sel,
  input  logic                 dp_write,
  input  logic                 hready,
  input  logic [MODE_CW_W-1:0] prot_mode_cw,
  input  logic [BUS_W-1:0]     hwdata,
  output logic [BUS_W-1:0]     hrdata,
  input  logic                 arq_in,
  output logic                 hready_out,
  output logic                 mode_corrected,
  // statistics
  output logic [CNT_W-1:0]     cnt_corrected,
  output logic [CNT_W-1:0]     cnt_detected,
  output logic [CNT_W-1:0]     cnt_punctured,
  output logic [CNT_W-1:0]     cnt_arq
);

  logic              phase_q;
  logic [MODE_W-1:0] mode;

  edc_status_t       dec_status;
  logic              wr_arq;
  logic [$clog2(ARQ_MAX+1)-1:0] arq_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= 1'b0;
    else        phase_q <= ~phase_q;
  end

  edc_mode_dec u_mode_dec (
    .mode_cw  (prot_mode_cw),
    .mode     (mode),
    .corrected(mode_corrected)
  );

  edc_data_dec #(.PHASE_SHIFT(PHASE_SHIFT)) u_data_dec (
    .mode   (mode),
    .bus    (hwdata),
    .phase  (phase_q),
    .payload(wpayload),
    .status (dec_status)
  );

  edc_data_enc #(.PHASE_SHIFT(PHASE_SHIFT)) u_data_enc (
    .mode   (mode),
    .payload(rpayload),
    .phase  (phase_q),
    .bus    (hrdata)
  );

  assign wr_arq     = dp_sel && dp_write && (mode == MODE_PARITY_ARQ) && dec_status.detected
                      && (arq_cnt_q < ($bits(arq_cnt_q))'(ARQ_MAX));
  assign hready_out = core_ready && !wr_arq && !(dp_sel && !dp_write && arq_in);
  assign wvalid     = dp_sel && dp_write && hready;
  assign wstatus    = dec_status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arq_cnt_q     <= '0;
      cnt_corrected <= '0;
      cnt_detected  <= '0;
      cnt_punctured <= '0;
      cnt_arq       <= '0;
    end else begin
      if (hready)      arq_cnt_q <= '0;
      else if (wr_arq) arq_cnt_q <= arq_cnt_q + 1'b1;
      if (wr_arq && cnt_arq != '1) cnt_arq <= cnt_arq + 1'b1;
      if (wvalid) begin
        if (dec_status.corrected && cnt_corrected != '1) cnt_corrected <= cnt_corrected + 1'b1;
        if (dec_status.detected  && cnt_detected  != '1) cnt_detected  <= cnt_detected + 1'b1;
        if (dec_status.punctured && cnt_punctured != '1) cnt_punctured <= cnt_punctured + 1'b1;
      end
    end
  end

endmodule
