// Protection mode RAM of the AHB data bus.
//
// Holds one Hamming (7,4)-coded protection mode per memory segment. The bus
// reads it with the segment of each accepted transfer address, so the mode
// arrives together with the transfer's data phase; a master writes it to
// set the protection of a segment. One synchronous read port (`re` enables
// the read, output registered) and one write port; a read and write of the
// same segment in one cycle returns the old codeword.
//
// At start-up every segment holds mode 1 (no protection), so the bus works
// before any application has chosen a mode. The RAM, its per-segment
// organisation and the Hamming protection follow the document; the number of
// segments (2^11, a single block RAM of 2K x 9 on the prototype's FPGA) and
// the start-up contents are this design's own choices.
module prot_mode_ram
  import edc_pkg::*;
#(
  parameter int unsigned SEG_W = 11
) (
  input  logic                 clk,
  input  logic                 re,
  input  logic [SEG_W-1:0]     raddr,
  output logic [MODE_CW_W-1:0] rdata,
  input  logic                 we,
  input  logic [SEG_W-1:0]     waddr,
  input  logic [MODE_CW_W-1:0] wdata
);

  localparam int unsigned NSEG = 1 << SEG_W;

  logic [MODE_CW_W-1:0] mem [NSEG];

  initial begin
    for (int i = 0; i < NSEG; i++) mem[i] = hamming74_enc(MODE_NONE);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
