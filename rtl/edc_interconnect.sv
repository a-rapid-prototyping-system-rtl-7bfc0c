// Protected AHB interconnect: bus multiplexers and protection mode lookup.
//
// Connects NM masters and NS slaves, all through their EDC units, over an
// AHB-style pipelined bus with 33-bit data lines. The address and control
// of the master granted by the arbiter (`hmaster`) are broadcast to the
// slaves; the slave is selected by address bits [AW-1:AW-4]. When an
// address phase is accepted (HREADY high) the segment of the address,
// bits [AW-1:AW-SEG_W], is read from the protection mode RAM, so the 7-bit
// mode codeword `prot_mode_cw` is valid during the data phase and is sent to
// every EDC unit. The data phase's master drives HWDATA through the write
// multiplexer, and the data phase's slave drives HRDATA and HREADY through
// the read multiplexer. A master's read ARQ request is routed to the slave
// of the data phase. Mode updates from the granted master are written into
// the mode RAM through the mode write multiplexer.
//
// Transfers to an address with no slave complete at once with HRDATA zero.
// Only single transfers with an address phase and a data phase are modelled
// (valid/write instead of the full HTRANS/HSIZE/HBURST set).
//
// Following the document: the multiplexer structure, the mode RAM addressed
// by the transfer address, the 7-bit mode and 33-bit data lines. This
// design's own: the address map, segment size and the reduced AHB control.
module edc_interconnect
  import edc_pkg::*;
#(
  parameter int unsigned NM    = 2,
  parameter int unsigned NS    = 2,
  parameter int unsigned AW    = 32,
  parameter int unsigned SEG_W = 11
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // arbiter
  input  logic [$clog2(NM)-1:0]            hmaster,
  // masters (through their EDC units)
  input  logic [NM-1:0][AW-1:0]            m_haddr,
  input  logic [NM-1:0]                    m_hvalid,
  input  logic [NM-1:0]                    m_hwrite,
  input  logic [NM-1:0][BUS_W-1:0]         m_hwdata,
  input  logic [NM-1:0]                    m_arq,
  input  logic [NM-1:0]                    m_mode_we,
  input  logic [NM-1:0][SEG_W-1:0]         m_mode_wseg,
  input  logic [NM-1:0][MODE_CW_W-1:0]     m_mode_wcw,
  output logic [NM-1:0]                    m_dp_mine,
  output logic [BUS_W-1:0]                 hrdata,
  output logic                             hready,
  output logic [MODE_CW_W-1:0]             prot_mode_cw,
  output logic                             dp_write,
  // slaves (through their EDC units)
  output logic [NS-1:0]                    s_hsel,
  output logic [AW-1:0]                    haddr,
  output logic                             hvalid,
  output logic                             hwrite,
  output logic [BUS_W-1:0]                 hwdata,
  output logic [NS-1:0]                    s_dp_sel,
  output logic                             s_arq,
  input  logic [NS-1:0][BUS_W-1:0]         s_hrdata,
  input  logic [NS-1:0]                    s_hready
);

  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic          dp_valid_q, dp_write_q, dp_mapped_q;
  logic [MW-1:0] dp_master_q;
  logic [SW-1:0] dp_slave_q;
  logic [3:0]    region;
  logic          mapped;

  // ------------------------------------------------------- address phase
  assign haddr  = m_haddr[hmaster];
  assign hvalid = m_hvalid[hmaster];
  assign hwrite = m_hwrite[hmaster];
  assign region = haddr[AW-1 -: 4];
  assign mapped = (32'(region) < NS);

  always_comb begin
    s_hsel = '0;
    if (hvalid && mapped) s_hsel[SW'(region)] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid_q  <= 1'b0;
      dp_write_q  <= 1'b0;
      dp_mapped_q <= 1'b0;
      dp_master_q <= '0;
      dp_slave_q  <= '0;
    end else if (hready) begin
      dp_valid_q  <= hvalid;
      dp_write_q  <= hwrite;
      dp_mapped_q <= mapped;
      dp_master_q <= MW'(hmaster);
      dp_slave_q  <= SW'(region);
    end
  end

  prot_mode_ram #(.SEG_W(SEG_W)) u_mode_ram (
    .clk  (clk),
    .re   (hready),
    .raddr(haddr[AW-1 -: SEG_W]),
    .rdata(prot_mode_cw),
    .we   (m_mode_we[hmaster]),
    .waddr(m_mode_wseg[hmaster]),
    .wdata(m_mode_wcw[hmaster])
  );

  // ---------------------------------------------------------- data phase
  assign dp_write = dp_write_q;
  assign hwdata   = m_hwdata[dp_master_q];
  assign s_arq    = dp_valid_q && m_arq[dp_master_q];

  always_comb begin
    m_dp_mine = '0;
    s_dp_sel  = '0;
    if (dp_valid_q) m_dp_mine[dp_master_q] = 1'b1;
    if (dp_valid_q && dp_mapped_q) s_dp_sel[dp_slave_q] = 1'b1;
  end

  always_comb begin
    if (dp_valid_q && dp_mapped_q) begin
      hrdata = s_hrdata[dp_slave_q];
      hready = s_hready[dp_slave_q];
    end else begin
      hrdata = '0;
      hready = 1'b1;
    end
  end

endmodule
