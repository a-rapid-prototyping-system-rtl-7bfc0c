// Protection-mode encoder of a master EDC unit.
//
// Turns a 4-bit protection mode identifier into the Hamming (7,4) codeword
// that is written into the protection mode RAM (bit layout in edc_pkg).
// Purely combinational. The document specifies the (7,4) Hamming protection
// of the mode identifiers; the bit layout is this design's own.
module edc_mode_enc
  import edc_pkg::*;
(
  input  logic [MODE_W-1:0]    mode,
  output logic [MODE_CW_W-1:0] mode_cw
);

  assign mode_cw = hamming74_enc(mode);

endmodule
