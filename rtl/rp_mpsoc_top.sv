// Error-resilient two-processor system-on-chip: protection and fault
// emulation hardware.
//
// The system couples NCPU processor cores and NS bus slaves over an AHB data
// bus, and protects it at three places:
//   * data path   - each core's inter-stage pipeline registers are
//                   shadow-protected with micro-rollback
//                   (dp_protected_pipeline, 2 cycles per corrected error);
//   * control path- a control flow checker per core compares every fetch PC
//                   and its successor with the program's control flow
//                   instruction graph and forces a re-fetch
//                   (cfc_checker; the PC multiplexer input for the
//                   re-execution address is here);
//   * interconnect- EDC units at every master and slave and a protection
//                   mode RAM select, per memory segment, one of several
//                   codes for the 33 data lines (edc_interconnect,
//                   edc_master, edc_slave), with ARQ, voting and puncturing.
// Fault emulation: LFSR-driven injectors hit the pipeline register inputs,
// the next-PC lines and the two data buses at run-time-programmable rates,
// by inversion or (on the buses) by a one-cycle delay.
//
// Slave 1 is the Turbo slave (ts_turbo_slave), which generates, encodes and
// checks the frames of the Turbo decoding experiment that runs in software
// on the cores; its noise channel is outside this design (chan_* ports).
// The processor cores, the AHB arbiter and the memory controller (slave 0)
// are not part of this design either. Their connections are ports:
//   pipe_*  - per core: the stage outputs feeding the protected registers
//             (pipe_d), the register outputs (pipe_q) and hold/retry/commit
//             for the fetch and write-back stages;
//   pc_*    - per core: fetch PC, next PC from the core's PC multiplexer,
//             and the next PC after fault injection and re-execution
//             override, which the core must load into its fetch register;
//   m_*     - per core: its bus requests and plain 32-bit payloads;
//   mem_*   - the memory controller's selection and plain payloads;
//   s_*     - address and direction shared by the slaves;
//   hmaster - the arbiter's grant.
// Slave i answers addresses whose top four bits equal i; the protection
// mode of an access comes from segment haddr[31:21].
module rp_mpsoc_top
  import edc_pkg::*;
  import cfc_pkg::*;
#(
  parameter int unsigned NCPU  = 2,
  parameter int unsigned NREG  = 4,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = 32,
  parameter int unsigned SEG_W = 11,
  parameter int unsigned IDX_W = 10,
  parameter int unsigned K     = 512,
  // bus slaves: memory controller, Turbo slave
  localparam int unsigned NS   = 2
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // fault injection control
  input  logic                                inj_dp_en,
  input  logic [15:0]                         inj_dp_thr,
  input  logic                                inj_cp_en,
  input  logic [15:0]                         inj_cp_thr,
  input  logic                                inj_bus_en,
  input  logic [15:0]                         inj_bus_thr,
  input  logic                                inj_bus_delay,
  // data path: pipeline of each core
  input  logic [NCPU-1:0][NREG-1:0][W-1:0]    pipe_d,
  output logic [NCPU-1:0][NREG-1:0][W-1:0]    pipe_q,
  output logic [NCPU-1:0]                     pipe_hold,
  output logic [NCPU-1:0]                     pipe_retry,
  output logic [NCPU-1:0]                     pipe_commit,
  output logic [NCPU-1:0][31:0]               pipe_rollbacks,
  // control path: fetch of each core
  input  logic                                cfc_check_en,
  input  logic [NCPU-1:0]                     pc_advance,
  input  logic [NCPU-1:0][AW-1:0]             pc_fetch,
  input  logic [NCPU-1:0][AW-1:0]             pc_next_core,
  output logic [NCPU-1:0][AW-1:0]             pc_next,
  output logic [NCPU-1:0]                     pc_reexec,
  output logic [NCPU-1:0][31:0]               cfc_errors,
  input  logic [NCPU-1:0]                     cfig_we,
  input  logic [IDX_W-1:0]                    cfig_waddr,
  input  cfi_kind_e                           cfig_wkind,
  input  logic [AW-1:0]                       cfig_wtarget,
  // bus: masters (the cores)
  input  logic [$clog2(NCPU)-1:0]             hmaster,
  input  logic [NCPU-1:0][AW-1:0]             m_haddr,
  input  logic [NCPU-1:0]                     m_hvalid,
  input  logic [NCPU-1:0]                     m_hwrite,
  input  logic [NCPU-1:0][PAYLOAD_W-1:0]      m_wpayload,
  output logic [NCPU-1:0][PAYLOAD_W-1:0]      m_rpayload,
  output edc_status_t [NCPU-1:0]              m_rstatus,
  output logic [NCPU-1:0]                     m_rvalid,
  input  logic [NCPU-1:0]                     m_mode_set,
  input  logic [NCPU-1:0][SEG_W-1:0]          m_mode_set_seg,
  input  logic [NCPU-1:0][MODE_W-1:0]         m_mode_set_val,
  output logic [NCPU-1:0][31:0]               m_cnt_arq,
  output logic [NCPU-1:0][31:0]               m_cnt_corrected,
  output logic [NCPU-1:0][31:0]               m_cnt_punctured,
  output logic                                hready,
  // bus: slave 0, the memory controller
  output logic                                mem_hsel,
  output logic [AW-1:0]                       s_haddr,
  output logic                                s_hwrite,
  output logic                                mem_dp_sel,
  output logic                                s_dp_write,
  input  logic [PAYLOAD_W-1:0]                mem_rpayload,
  input  logic                                mem_core_ready,
  output logic [PAYLOAD_W-1:0]                mem_wpayload,
  output edc_status_t                         mem_wstatus,
  output logic                                mem_wvalid,
  output logic [NS-1:0][31:0]                 s_cnt_arq,
  output logic [NS-1:0][31:0]                 s_cnt_corrected,
  // slave 1, the Turbo slave: noise channel port and statistics
  output logic                                chan_valid,
  output logic [2:0]                          chan_bits,
  input  logic                                chan_llr_valid,
  input  logic [2:0][5:0]                     chan_llr,
  output logic [31:0]                         ts_frames,
  output logic [31:0]                         ts_bit_errors,
  output logic [31:0]                         ts_frame_errors,
  output logic                                ts_llr_ready,
  // fault statistics
  output logic [31:0]                         inj_bus_hits
);

  logic [NS-1:0]                 s_hsel, s_dp_sel, s_core_ready, s_wvalid;
  logic [NS-1:0][PAYLOAD_W-1:0]  s_rpayload, s_wpayload;
  edc_status_t [NS-1:0]          s_wstatus;

  // ------------------------------------------------------------ per core
  logic [NCPU-1:0][BUS_W-1:0]     m_hwdata;
  logic [NCPU-1:0]                m_arq, m_mode_we, m_dp_mine;
  logic [NCPU-1:0][SEG_W-1:0]     m_mode_wseg;
  logic [NCPU-1:0][MODE_CW_W-1:0] m_mode_wcw;
  logic [BUS_W-1:0]               hrdata, hrdata_inj, hwdata, hwdata_inj;
  logic [MODE_CW_W-1:0]           prot_mode_cw;
  logic                           dp_write, hvalid, s_arq;
  logic [NS-1:0][BUS_W-1:0]       s_hrdata;
  logic [NS-1:0]                  s_hready;

  for (genvar c = 0; c < NCPU; c++) begin : g_cpu
    logic [NREG-1:0][W-1:0] inj_mask;
    logic [NREG*W-1:0]      inj_flat_unused, mask_flat;
    logic [31:0]            dp_hits_unused, pc_hits_unused;
    logic [AW-1:0]          pc_inj, pc_mask_unused, reexec_pc;
    logic                   reexec;
    logic [31:0]            checked_unused, unchecked_unused;
    logic [15:0]            ovf_unused;

    // data path: faults at the main register inputs
    err_injector #(.W(NREG*W), .SEED(51'h1_3579_BDF0_2468 + 51'(c))) u_inj_dp (
      .clk(clk), .rst_n(rst_n), .en(inj_dp_en), .thr(inj_dp_thr), .delay_mode(1'b0),
      .din('0), .dout(inj_flat_unused), .mask(mask_flat), .hits(dp_hits_unused)
    );
    assign inj_mask = mask_flat;

    dp_protected_pipeline #(.NREG(NREG), .W(W)) u_pipe (
      .clk       (clk),
      .rst_n     (rst_n),
      .d         (pipe_d[c]),
      .inj_main  (inj_mask),
      .inj_shadow('0),
      .q         (pipe_q[c]),
      .err_vec   (),
      .hold      (pipe_hold[c]),
      .retry     (pipe_retry[c]),
      .commit    (pipe_commit[c]),
      .rollbacks (pipe_rollbacks[c])
    );

    // control path: faults on the next-PC lines, re-execution override
    err_injector #(.W(AW), .SEED(51'h4_A5A5_0F0F_9999 + 51'(c))) u_inj_pc (
      .clk(clk), .rst_n(rst_n), .en(inj_cp_en && pc_advance[c]), .thr(inj_cp_thr), .delay_mode(1'b0),
      .din(pc_next_core[c]), .dout(pc_inj), .mask(pc_mask_unused), .hits(pc_hits_unused)
    );
    assign pc_next[c]   = reexec ? reexec_pc : pc_inj;
    assign pc_reexec[c] = reexec;

    cfc_checker #(.AW(AW), .IDX_W(IDX_W)) u_cfc (
      .clk            (clk),
      .rst_n          (rst_n),
      .check_en       (cfc_check_en),
      .advance        (pc_advance[c]),
      .pc_n           (pc_fetch[c]),
      .pc_next        (pc_next[c]),
      .reexec         (reexec),
      .reexec_pc      (reexec_pc),
      .errors         (cfc_errors[c]),
      .checked        (checked_unused),
      .unchecked      (unchecked_unused),
      .stack_overflows(ovf_unused),
      .cfig_we        (cfig_we[c]),
      .cfig_waddr     (cfig_waddr),
      .cfig_wkind     (cfig_wkind),
      .cfig_wtarget   (cfig_wtarget)
    );

    edc_master #(.SEG_W(SEG_W)) u_edc (
      .clk               (clk),
      .rst_n             (rst_n),
      .wpayload          (m_wpayload[c]),
      .rpayload          (m_rpayload[c]),
      .rstatus           (m_rstatus[c]),
      .rvalid            (m_rvalid[c]),
      .mode_set          (m_mode_set[c]),
      .mode_set_seg      (m_mode_set_seg[c]),
      .mode_set_val      (m_mode_set_val[c]),
      .mode_we           (m_mode_we[c]),
      .mode_wseg         (m_mode_wseg[c]),
      .mode_wcw          (m_mode_wcw[c]),
      .dp_mine           (m_dp_mine[c]),
      .dp_write          (dp_write),
      .hready            (hready),
      .prot_mode_cw      (prot_mode_cw),
      .hwdata            (m_hwdata[c]),
      .hrdata            (hrdata_inj),
      .arq               (m_arq[c]),
      .cur_mode          (),
      .cnt_corrected     (m_cnt_corrected[c]),
      .cnt_detected      (),
      .cnt_punctured     (m_cnt_punctured[c]),
      .cnt_arq           (m_cnt_arq[c]),
      .cnt_mode_corrected()
    );
  end

  // -------------------------------------------------------------- the bus
  edc_interconnect #(.NM(NCPU), .NS(NS), .AW(AW), .SEG_W(SEG_W)) u_bus (
    .clk         (clk),
    .rst_n       (rst_n),
    .hmaster     (hmaster),
    .m_haddr     (m_haddr),
    .m_hvalid    (m_hvalid),
    .m_hwrite    (m_hwrite),
    .m_hwdata    (m_hwdata),
    .m_arq       (m_arq),
    .m_mode_we   (m_mode_we),
    .m_mode_wseg (m_mode_wseg),
    .m_mode_wcw  (m_mode_wcw),
    .m_dp_mine   (m_dp_mine),
    .hrdata      (hrdata),
    .hready      (hready),
    .prot_mode_cw(prot_mode_cw),
    .dp_write    (dp_write),
    .s_hsel      (s_hsel),
    .haddr       (s_haddr),
    .hvalid      (hvalid),
    .hwrite      (s_hwrite),
    .hwdata      (hwdata),
    .s_dp_sel    (s_dp_sel),
    .s_arq       (s_arq),
    .s_hrdata    (s_hrdata),
    .s_hready    (s_hready)
  );
  assign s_dp_write = dp_write;

  // faults on the write and read data lines
  logic [BUS_W-1:0] wmask_unused, rmask_unused;
  logic [31:0]      rhits_unused, whits;
  logic             hvalid_unused;
  assign hvalid_unused = hvalid;

  err_injector #(.W(BUS_W), .SEED(51'h0_DEAD_BEEF_0001)) u_inj_hwdata (
    .clk(clk), .rst_n(rst_n), .en(inj_bus_en), .thr(inj_bus_thr), .delay_mode(inj_bus_delay),
    .din(hwdata), .dout(hwdata_inj), .mask(wmask_unused), .hits(whits)
  );
  err_injector #(.W(BUS_W), .SEED(51'h0_0BAD_CAFE_0002)) u_inj_hrdata (
    .clk(clk), .rst_n(rst_n), .en(inj_bus_en), .thr(inj_bus_thr), .delay_mode(inj_bus_delay),
    .din(hrdata), .dout(hrdata_inj), .mask(rmask_unused), .hits(rhits_unused)
  );
  assign inj_bus_hits = whits;

  // slave 0: the memory controller (outside this design)
  assign mem_hsel        = s_hsel[0];
  assign mem_dp_sel      = s_dp_sel[0];
  assign s_rpayload[0]   = mem_rpayload;
  assign s_core_ready[0] = mem_core_ready;
  assign mem_wpayload    = s_wpayload[0];
  assign mem_wstatus     = s_wstatus[0];
  assign mem_wvalid      = s_wvalid[0];

  // slave 1: the Turbo slave
  ts_turbo_slave #(.K(K)) u_turbo (
    .clk           (clk),
    .rst_n         (rst_n),
    .hsel          (s_hsel[1]),
    .haddr         (s_haddr),
    .hready        (hready),
    .wpayload      (s_wpayload[1]),
    .wvalid        (s_wvalid[1]),
    .rpayload      (s_rpayload[1]),
    .core_ready    (s_core_ready[1]),
    .chan_valid    (chan_valid),
    .chan_bits     (chan_bits),
    .chan_llr_valid(chan_llr_valid),
    .chan_llr      (chan_llr),
    .frames        (ts_frames),
    .bit_errors    (ts_bit_errors),
    .frame_errors  (ts_frame_errors),
    .llr_ready     (ts_llr_ready)
  );

  for (genvar s = 0; s < NS; s++) begin : g_slv
    edc_slave u_edc (
      .clk           (clk),
      .rst_n         (rst_n),
      .rpayload      (s_rpayload[s]),
      .core_ready    (s_core_ready[s]),
      .wpayload      (s_wpayload[s]),
      .wstatus       (s_wstatus[s]),
      .wvalid        (s_wvalid[s]),
      .dp_sel        (s_dp_sel[s]),
      .dp_write      (dp_write),
      .hready        (hready),
      .prot_mode_cw  (prot_mode_cw),
      .hwdata        (hwdata_inj),
      .hrdata        (s_hrdata[s]),
      .arq_in        (s_arq),
      .hready_out    (s_hready[s]),
      .mode_corrected(),
      .cnt_corrected (s_cnt_corrected[s]),
      .cnt_detected  (),
      .cnt_punctured (),
      .cnt_arq       (s_cnt_arq[s])
    );
  end

endmodule
