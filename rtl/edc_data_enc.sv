// Data encoder of an EDC unit (sending side of the 33-bit data bus).
//
// Maps a 32-bit payload onto the 33 bus lines according to the protection
// mode of the transfer (table in edc_pkg): even parity, plain, three-fold
// repetition of an 11-bit word, or four 6-bit soft values with tripled sign,
// with parity or with doubled sign. When PHASE_SHIFT is set, bus bit
// PHASE_BIT is additionally inverted whenever `phase` is high; the receiving
// unit toggles the same phase, so a bus that is late by a whole cycle shows
// up as an error in that bit.
//
// Purely combinational. Modes 0 to 3 and the phase shifting follow the
// document's mode table and text; modes 4 and 5 are the two input-data codes
// the document evaluates for the Turbo decoder input (parity over the six
// bits, doubled sign, both with puncturing), placed in the free mode numbers
// by this design. Reserved modes are sent unprotected.
module edc_data_enc
  import edc_pkg::*;
#(
  parameter bit PHASE_SHIFT = 1'b1
) (
  input  logic [MODE_W-1:0]    mode,
  input  logic [PAYLOAD_W-1:0] payload,
  input  logic                 phase,
  output logic [BUS_W-1:0]     bus
);

  logic [BUS_W-1:0] code;
  logic [5:0]       v [4];

  always_comb begin
    for (int i = 0; i < 4; i++) v[i] = payload[6*i +: 6];
    code = '0;
    unique case (mode)
      MODE_PARITY_ARQ:   code = {^payload, payload};
      MODE_REP3:         code = {payload[10:0], payload[10:0], payload[10:0]};
      MODE_SIGN3:        for (int i = 0; i < 4; i++) code[8*i +: 8] = {v[i][5], v[i][5], v[i]};
      MODE_PARITY_PUNCT: for (int i = 0; i < 4; i++) code[7*i +: 7] = {^v[i], v[i]};
      MODE_SIGN2_PUNCT:  for (int i = 0; i < 4; i++) code[7*i +: 7] = {v[i][5], v[i]};
      default:           code = {1'b0, payload};
    endcase
    bus = code;
    if (PHASE_SHIFT) bus[PHASE_BIT] = code[PHASE_BIT] ^ phase;
  end

endmodule
