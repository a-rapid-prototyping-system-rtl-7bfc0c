// End-to-end testbench of rp_mpsoc_top at its default parameters (two cores,
// K = 512).
//
// Around the top it models what the design connects to: for each core a
// five-stage pipeline's stage logic and a fetch unit running a small program
// with a call, a return, a branch and a jump; the memory controller as a
// word array; the noise channel as a noise-free BPSK mapper. Bus traffic is
// issued by a "software" process on both cores.
//
// Phase 1, no faults: protection modes are written into the mode RAM, the
// memory is written and read in parity/ARQ mode and in repetition mode, a
// Turbo frame is generated, its soft values are read in sign-vote mode,
// decided and written back, and the error monitor must report no errors.
// Phase 2, faults injected into pipeline registers, next-PC lines and both
// data buses: the same traffic must still deliver correct data (ARQ and
// votes), the pipelines must retire every value in order with two cycles
// per rollback, the fetch units must follow the program with one cycle per
// re-execution, a frame read with parity puncturing must show punctured
// values, and a run with delay-type bus faults must be repaired by ARQ.
// Each mechanism (rollback, re-execution, read and write ARQ, vote
// correction, puncturing, mode write, delay faults, Turbo frame) is counted
// and must have happened.
module tb_rp_mpsoc_top;
  import edc_pkg::*;
  import cfc_pkg::*;
  localparam int NCPU = 2, NREG = 4, W = 32, AW = 32, SEG_W = 11, IDX_W = 10, K = 512;

  logic clk = 0, rst_n = 0;
  logic inj_dp_en = 0, inj_cp_en = 0, inj_bus_en = 0, inj_bus_delay = 0;
  logic [15:0] inj_dp_thr = '0, inj_cp_thr = '0, inj_bus_thr = '0;
  logic [NCPU-1:0][NREG-1:0][W-1:0] pipe_d, pipe_q;
  logic [NCPU-1:0] pipe_hold, pipe_retry, pipe_commit;
  logic [NCPU-1:0][31:0] pipe_rollbacks;
  logic cfc_check_en = 0;
  logic [NCPU-1:0] pc_advance = '0, pc_reexec;
  logic [NCPU-1:0][AW-1:0] pc_fetch, pc_next_core, pc_next;
  logic [NCPU-1:0][31:0] cfc_errors;
  logic [NCPU-1:0] cfig_we = '0;
  logic [IDX_W-1:0] cfig_waddr = '0;
  cfi_kind_e cfig_wkind = CFI_NONE;
  logic [AW-1:0] cfig_wtarget = '0;
  logic [0:0] hmaster = '0;
  logic [NCPU-1:0][AW-1:0] m_haddr = '0;
  logic [NCPU-1:0] m_hvalid = '0, m_hwrite = '0, m_rvalid, m_mode_set = '0;
  logic [NCPU-1:0][31:0] m_wpayload = '0, m_rpayload;
  edc_status_t [NCPU-1:0] m_rstatus;
  logic [NCPU-1:0][SEG_W-1:0] m_mode_set_seg = '0;
  logic [NCPU-1:0][3:0] m_mode_set_val = '0;
  logic [NCPU-1:0][31:0] m_cnt_arq, m_cnt_corrected, m_cnt_punctured;
  logic hready;
  logic mem_hsel, s_hwrite, mem_dp_sel, s_dp_write, mem_core_ready, mem_wvalid;
  logic [AW-1:0] s_haddr;
  logic [31:0] mem_rpayload, mem_wpayload;
  edc_status_t mem_wstatus;
  logic [1:0][31:0] s_cnt_arq, s_cnt_corrected;
  logic chan_valid, chan_llr_valid, ts_llr_ready;
  logic [2:0] chan_bits;
  logic [2:0][5:0] chan_llr;
  logic [31:0] ts_frames, ts_bit_errors, ts_frame_errors, inj_bus_hits;

  rp_mpsoc_top dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------ pipelines
  function automatic logic [W-1:0] stage(input int i, input logic [W-1:0] x);
    return (x * 32'd5) ^ (32'h5A5A_0000 + 32'(i));
  endfunction
  function automatic logic [W-1:0] expect_of(input logic [W-1:0] p);
    logic [W-1:0] x = p;
    for (int i = 0; i < NREG; i++) x = stage(i, x);
    return x;
  endfunction

  logic [NCPU-1:0][W-1:0] fpc, fpc_hist, fpc_out;
  int pipe_cycles [NCPU], pipe_commits [NCPU];
  logic [W-1:0] wb_next [NCPU];
  bit pipe_run = 0;

  for (genvar c = 0; c < NCPU; c++) begin : g_core
    assign fpc_out[c] = pipe_retry[c] ? fpc_hist[c] : fpc[c];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin fpc[c] <= '0; fpc_hist[c] <= '0; end
      else if (!pipe_hold[c]) begin
        fpc[c] <= fpc_out[c] + 1;
        if (!pipe_retry[c]) fpc_hist[c] <= fpc[c];
      end
    end
    always_comb begin
      pipe_d[c][0] = stage(0, fpc_out[c]);
      for (int i = 1; i < NREG; i++) pipe_d[c][i] = stage(i, pipe_q[c][i-1]);
    end
    // write-back: every value once, in order
    always @(posedge clk) if (pipe_run) begin
      pipe_cycles[c]++;
      if (pipe_commit[c]) begin
        pipe_commits[c]++;
        chk(pipe_q[c][NREG-1] == expect_of(wb_next[c]), "write-back value");
        wb_next[c]++;
      end
    end
  end

  // ------------------------------------------------------ fetch units
  function automatic logic [AW-1:0] succ(input logic [AW-1:0] pc, input bit taken);
    case (pc)
      32'h10: return 32'h80;                 // call
      32'h8c: return 32'h14;                 // return
      32'h20: return taken ? 32'h0 : 32'h24; // branch
      32'h24: return 32'h0;                  // jump
      default: return pc + 4;
    endcase
  endfunction

  logic [NCPU-1:0][AW-1:0] fetch_q;
  logic [AW-1:0] exp_pc [NCPU], prev_pc [NCPU];
  bit prev_bad [NCPU];
  int n_reexec = 0, n_pc_faults = 0, fetch_checked = 0;
  bit fetch_run = 0;
  assign pc_fetch = fetch_q;

  for (genvar c = 0; c < NCPU; c++) begin : g_fetch
    always_comb pc_next_core[c] = succ(fetch_q[c], fetch_q[c][2] ^ fetch_q[c][6] ^ c[0] ^ (pipe_cycles[c] % 3 == 0));
    always @(posedge clk) begin
      if (fetch_run) begin
        if (pc_reexec[c]) begin
          n_reexec++;
          chk(prev_bad[c], "re-execution only after a corrupted next PC");
          chk(pc_next[c] == prev_pc[c], "re-execution address");
          prev_bad[c] = 0;
          exp_pc[c] = prev_pc[c];
        end else begin
          chk(fetch_q[c] == exp_pc[c], "fetch follows the program");
          chk(!prev_bad[c], "corrupted next PC caught");
          fetch_checked++;
          prev_bad[c] = (pc_next[c] != pc_next_core[c]);
          if (prev_bad[c]) n_pc_faults++;
          exp_pc[c] = pc_next_core[c];
          prev_pc[c] = fetch_q[c];
        end
      end
      fetch_q[c] <= !rst_n ? '0 : (pc_advance[c] ? pc_next[c] : fetch_q[c]);
    end
  end

  // ------------------------------------------------------ memory controller
  logic [31:0] mem [512];
  logic [8:0]  mem_a;
  assign mem_core_ready = 1'b1;
  assign mem_rpayload = mem[mem_a];
  always @(posedge clk) begin
    if (mem_hsel && hready) mem_a <= {s_haddr[21], s_haddr[9:2]};
    if (mem_wvalid) mem[mem_a] <= mem_wpayload;
  end

  // ------------------------------------------------------ noise channel
  logic [2:0] ch1, ch2;
  logic cv1 = 0, cv2 = 0;
  function automatic logic [5:0] bpsk(input logic b);
    return b ? 6'(-20) : 6'd20;
  endfunction
  always @(posedge clk) begin
    cv1 <= chan_valid; ch1 <= chan_bits;
    cv2 <= cv1;        ch2 <= ch1;
  end
  assign chan_llr_valid = cv2;
  assign chan_llr = {bpsk(ch2[2]), bpsk(ch2[1]), bpsk(ch2[0])};

  // ------------------------------------------------------ bus software
  task automatic bus_xfer(input int m, input logic [31:0] a, input bit wr, input logic [31:0] wd,
                          output logic [31:0] rd, output edc_status_t st);
    @(negedge clk);
    hmaster = 1'(m);
    m_haddr[m] = a; m_hvalid[m] = 1; m_hwrite[m] = wr;
    do @(posedge clk); while (!hready);
    @(negedge clk);
    m_hvalid[m] = 0;
    m_wpayload[m] = wd;
    forever begin
      #1;
      if (hready) break;
      @(negedge clk);
    end
    rd = m_rpayload[m];
    st = m_rstatus[m];
    @(posedge clk);
  endtask
  task automatic wr32(input int m, input logic [31:0] a, input logic [31:0] d);
    logic [31:0] r; edc_status_t s;
    bus_xfer(m, a, 1, d, r, s);
  endtask
  task automatic rd32(input int m, input logic [31:0] a, output logic [31:0] d, output edc_status_t s);
    bus_xfer(m, a, 0, '0, d, s);
  endtask
  int n_mode_writes = 0;
  task automatic set_mode(input int m, input logic [31:0] a, input logic [3:0] mode);
    @(negedge clk);
    hmaster = 1'(m);
    m_mode_set[m] = 1; m_mode_set_seg[m] = a[31:21]; m_mode_set_val[m] = mode;
    @(negedge clk);
    m_mode_set[m] = 0;
    n_mode_writes++;
  endtask

  localparam logic [31:0] SEG_A = 32'h0000_0000;   // parity + ARQ
  localparam logic [31:0] SEG_B = 32'h0020_0000;   // three-fold repetition
  localparam logic [31:0] TS    = 32'h1000_0000;   // Turbo slave

  logic [31:0] golden [512];
  task automatic mem_traffic(input int n, input string tag);
    logic [31:0] r; edc_status_t s;
    for (int i = 0; i < n; i++) begin
      int m = i % 2;
      int w = $urandom % 64;
      logic [31:0] d = $urandom;
      wr32(m, SEG_A + 32'(4 * w), d);
      golden[w] = d;
      rd32(1 - m, SEG_A + 32'(4 * w), r, s);
      chk(r == d, {tag, " parity/ARQ data"});
      d = {21'b0, 11'($urandom)};
      wr32(m, SEG_B + 32'(4 * w), d);
      rd32(1 - m, SEG_B + 32'(4 * w), r, s);
      chk(r == d, {tag, " repetition data"});
    end
  endtask

  int n_punct_values = 0;
  task automatic turbo_frame(input int m, input logic [3:0] soft_mode, input bit expect_clean, input string tag);
    logic [31:0] r, frames0, berr0, ferr0; edc_status_t s;
    logic [31:0] dec [K/32];
    int tries = 0;
    set_mode(m, TS, MODE_PARITY_ARQ);
    rd32(m, TS + 32'h8, frames0, s);
    rd32(m, TS + 32'hC, berr0, s);
    rd32(m, TS + 32'h10, ferr0, s);
    wr32(m, TS + 32'h0, 32'h1);
    do begin rd32(m, TS + 32'h0, r, s); tries++; end while (!(r[1] && !r[0]) && tries < 3000);
    chk(r[1], {tag, " soft values ready"});
    set_mode(m, TS, soft_mode);
    for (int n = 0; n < K; n++) begin
      rd32(n % 2, TS + 32'h2000 + 32'(4 * n), r, s);
      for (int v = 0; v < 3; v++) if (soft_mode == MODE_PARITY_PUNCT && r[6*v +: 6] == 6'd0) n_punct_values++;
      if (expect_clean) chk(r[17:0] != 0 && (r[5:0] == 6'd20 || r[5:0] == 6'(-20) || r[5:4] == 2'b01 || r[5:4] == 2'b10),
                            {tag, " soft value sign intact"});
      dec[n / 32][n % 32] = r[5];
    end
    set_mode(m, TS, MODE_PARITY_ARQ);
    for (int w = 0; w < K / 32; w++) wr32(m, TS + 32'h1000 + 32'(4 * w), dec[w]);
    rd32(m, TS + 32'h8, r, s);
    chk(r == frames0 + 1, {tag, " frame counted"});
    rd32(m, TS + 32'hC, r, s);
    if (expect_clean) chk(r == berr0, {tag, " no bit errors"});
    rd32(m, TS + 32'h10, r, s);
    if (expect_clean) chk(r == ferr0, {tag, " no frame errors"});
  endtask

  // ------------------------------------------------------ CFIG
  task automatic cfig(input logic [AW-1:0] a, input cfi_kind_e k, input logic [AW-1:0] t);
    @(negedge clk);
    cfig_we = '1; cfig_waddr = IDX_W'(a >> 2); cfig_wkind = k; cfig_wtarget = t;
    @(negedge clk);
    cfig_we = '0;
  endtask

  int arq_before, rollbacks_total, cyc_total, commit_total;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    cfig(32'h10, CFI_CALL, 32'h80);
    cfig(32'h8c, CFI_RET, 32'h0);
    cfig(32'h20, CFI_BRANCH, 32'h0);
    cfig(32'h24, CFI_JUMP, 32'h0);
    // start the cores: fetch (PC 0) and pipelines, which run from reset
    @(negedge clk);
    for (int c = 0; c < NCPU; c++) begin
      exp_pc[c] = 32'h0; prev_bad[c] = 0; prev_pc[c] = '0;
    end
    cfc_check_en = 1;
    pc_advance = '1;
    fetch_run = 1;
    for (int c = 0; c < NCPU; c++) begin
      pipe_cycles[c] = 0; pipe_commits[c] = 0; wb_next[c] = pipe_q[c][NREG-1] == expect_of(fpc[c] - 4) ? fpc[c] - 4 : fpc[c] - 3;
    end
    pipe_run = 1;

    // ---------------------------------------------- phase 1: no faults
    set_mode(0, SEG_A, MODE_PARITY_ARQ);
    set_mode(1, SEG_B, MODE_REP3);
    mem_traffic(40, "clean");
    turbo_frame(0, MODE_SIGN3, 1, "clean frame");
    chk(m_cnt_arq[0] + m_cnt_arq[1] + s_cnt_arq[0] + s_cnt_arq[1] == 0, "no ARQ without faults");
    chk(pipe_rollbacks[0] + pipe_rollbacks[1] == 0 && n_reexec == 0, "no corrections without faults");

    // ---------------------------------------------- phase 2: faults
    inj_dp_thr = 16'd4;   inj_dp_en = 1;
    inj_cp_thr = 16'd8;   inj_cp_en = 1;
    inj_bus_thr = 16'd24; inj_bus_en = 1;
    mem_traffic(150, "faulty");
    turbo_frame(1, MODE_SIGN3, 1, "faulty frame, sign vote");
    turbo_frame(0, MODE_PARITY_PUNCT, 0, "faulty frame, puncturing");
    arq_before = m_cnt_arq[0] + m_cnt_arq[1] + s_cnt_arq[0] + s_cnt_arq[1];
    inj_bus_delay = 1;
    inj_bus_thr = 16'd64;
    mem_traffic(60, "delay faults");
    inj_bus_delay = 0;
    inj_dp_en = 0; inj_cp_en = 0; inj_bus_en = 0;
    repeat (10) @(posedge clk);
    fetch_run = 0;
    pipe_run = 0;
    #1;

    // ---------------------------------------------- mechanisms
    rollbacks_total = pipe_rollbacks[0] + pipe_rollbacks[1];
    cyc_total = pipe_cycles[0] + pipe_cycles[1];
    commit_total = pipe_commits[0] + pipe_commits[1];
    $display("rollbacks=%0d re-executions=%0d pc faults=%0d arq(m)=%0d/%0d arq(s)=%0d/%0d",
             rollbacks_total, n_reexec, n_pc_faults, m_cnt_arq[0], m_cnt_arq[1], s_cnt_arq[0], s_cnt_arq[1]);
    $display("votes(m)=%0d/%0d votes(s)=%0d/%0d punctured=%0d/%0d values=%0d mode writes=%0d frames=%0d bus hits=%0d",
             m_cnt_corrected[0], m_cnt_corrected[1], s_cnt_corrected[0], s_cnt_corrected[1],
             m_cnt_punctured[0], m_cnt_punctured[1], n_punct_values, n_mode_writes, ts_frames, inj_bus_hits);
    chk(rollbacks_total > 0, "data-path rollback happened");
    chk(cyc_total == commit_total + 2 * rollbacks_total, "two cycles per rollback");
    chk(n_reexec > 0 && n_reexec == n_pc_faults, "every next-PC fault re-executed");
    chk(cfc_errors[0] + cfc_errors[1] == 32'(n_reexec), "checker error count");
    chk(m_cnt_arq[0] + m_cnt_arq[1] > 0, "read ARQ happened");
    chk(s_cnt_arq[0] > 0, "write ARQ happened");
    chk(m_cnt_arq[0] + m_cnt_arq[1] + s_cnt_arq[0] + s_cnt_arq[1] > arq_before, "delay faults repaired by ARQ");
    chk(m_cnt_corrected[0] + m_cnt_corrected[1] > 0, "read vote correction happened");
    chk(s_cnt_corrected[0] > 0, "write vote correction happened");
    chk(m_cnt_punctured[0] + m_cnt_punctured[1] > 0 && n_punct_values > 0, "puncturing happened");
    chk(n_mode_writes > 0, "mode writes happened");
    chk(ts_frames == 3, "three Turbo frames checked");
    chk(fetch_checked > 1000, "fetch activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
