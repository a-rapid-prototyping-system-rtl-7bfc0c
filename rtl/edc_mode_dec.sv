// Protection-mode decoder of an EDC unit.
//
// Receives the 7-bit Hamming (7,4) codeword read from the protection mode
// RAM for the current transfer, corrects a single flipped bit and returns
// the 4-bit mode identifier. `corrected` is high when the syndrome was not
// zero. Purely combinational. The Hamming (7,4) protection follows the
// document; the bit layout (edc_pkg) is this design's own.
module edc_mode_dec
  import edc_pkg::*;
(
  input  logic [MODE_CW_W-1:0] mode_cw,
  output logic [MODE_W-1:0]    mode,
  output logic                 corrected
);

  assign mode      = hamming74_dec(mode_cw);
  assign corrected = (hamming74_syndrome(mode_cw) != 3'd0);

endmodule
