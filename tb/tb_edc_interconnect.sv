// Testbench for edc_interconnect: address/control multiplexing by the
// granted master, slave selection, mode RAM writes by the granted master and
// lookup by the segment of each accepted address (codeword valid in the data
// phase), HWDATA/HRDATA/HREADY multiplexing in the data phase, wait states
// and ARQ routing.
module tb_edc_interconnect;
  localparam int NM = 2, NS = 2, AW = 32, SEG_W = 4;
  logic clk = 0, rst_n = 0;
  logic [0:0] hmaster = '0;
  logic [NM-1:0][AW-1:0] m_haddr = '0;
  logic [NM-1:0] m_hvalid = '0, m_hwrite = '0, m_arq = '0, m_mode_we = '0;
  logic [NM-1:0][32:0] m_hwdata = '0;
  logic [NM-1:0][SEG_W-1:0] m_mode_wseg = '0;
  logic [NM-1:0][6:0] m_mode_wcw = '0;
  logic [NM-1:0] m_dp_mine;
  logic [32:0] hrdata, hwdata;
  logic hready, dp_write, hvalid, hwrite, s_arq;
  logic [6:0] prot_mode_cw;
  logic [NS-1:0] s_hsel, s_dp_sel;
  logic [AW-1:0] haddr;
  logic [NS-1:0][32:0] s_hrdata = '0;
  logic [NS-1:0] s_hready = '1;
  int checks = 0, failures = 0;
  logic [6:0] seg_model [1 << SEG_W];

  edc_interconnect #(.NM(NM), .NS(NS), .AW(AW), .SEG_W(SEG_W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected data phase, captured when an address phase is accepted
  bit dpv = 0, dpw = 0;
  int dpm = 0, dps = 0;
  logic [6:0] dp_cw;
  int n_wait = 0, n_arq = 0, n_unmapped = 0;

  initial begin
    for (int i = 0; i < (1 << SEG_W); i++) seg_model[i] = 7'b000_0111;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      hmaster = 1'($urandom);
      for (int m = 0; m < NM; m++) begin
        // region 0 and 1 map to the two slaves, region 2 is unmapped
        m_haddr[m] = {4'($urandom % 3), 28'($urandom)};
        m_hvalid[m] = ($urandom % 4) != 0;
        m_hwrite[m] = $urandom % 2;
        m_hwdata[m] = 33'({$urandom, $urandom});
        m_arq[m] = ($urandom % 6) == 0;
        m_mode_we[m] = ($urandom % 8) == 0;
        m_mode_wseg[m] = SEG_W'($urandom);
        m_mode_wcw[m] = 7'($urandom);
      end
      for (int s = 0; s < NS; s++) begin
        s_hrdata[s] = 33'({$urandom, $urandom});
        s_hready[s] = ($urandom % 5) != 0;
      end
      #1;
      // address phase
      chk(haddr == m_haddr[hmaster] && hvalid == m_hvalid[hmaster] && hwrite == m_hwrite[hmaster], "address mux");
      chk(s_hsel == ((hvalid && haddr[31:28] < 2) ? NS'(1 << haddr[31:28]) : '0), "slave select");
      // data phase
      chk(m_dp_mine == (dpv ? NM'(1 << dpm) : '0), "data phase master");
      chk(s_dp_sel == ((dpv && dps < NS) ? NS'(1 << dps) : '0), "data phase slave");
      if (dpv) begin
        chk(hwdata == m_hwdata[dpm], "write data mux");
        chk(dp_write == dpw, "data phase direction");
        chk(prot_mode_cw == dp_cw, "mode codeword of the transfer's segment");
        chk(s_arq == m_arq[dpm], "ARQ routed to slave");
        if (dps < NS) chk(hrdata == s_hrdata[dps] && hready == s_hready[dps], "read mux");
        else begin chk(hready && hrdata == '0, "unmapped completes"); n_unmapped++; end
        if (!hready) n_wait++;
        if (s_arq) n_arq++;
      end else chk(hready, "idle bus ready");
      @(posedge clk);
      if (hready) begin
        dpv = hvalid; dpw = hwrite; dpm = int'(hmaster); dps = int'(haddr[31:28]);
        dp_cw = seg_model[haddr[31:31-SEG_W+1]];
      end
      if (m_mode_we[hmaster]) seg_model[m_mode_wseg[hmaster]] = m_mode_wcw[hmaster];
    end
    chk(n_wait > 50 && n_arq > 50 && n_unmapped > 50, "wait, ARQ and unmapped cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
