// Data decoder of an EDC unit (receiving side of the 33-bit data bus).
//
// Undoes the phase inversion of bus bit PHASE_BIT (when PHASE_SHIFT is set)
// and decodes the word according to the protection mode (table in
// edc_pkg):
//   0  parity check; a mismatch sets `status.detected` (the EDC unit then
//      asks for a retransmission)
//   1  passed through
//   2  bitwise majority vote over the three 11-bit copies, zero-extended
//   3  majority vote over the three sign copies of each 6-bit value
//   4  a value with wrong parity is punctured (set to zero)
//   5  a value whose two sign copies differ is punctured
// For modes 3..5 the four 6-bit values are returned in payload[23:0],
// upper bits zero. `status.corrected` flags a vote that outvoted a copy.
//
// Purely combinational. Decoding rules follow the document; the output
// layout and the status flags are this design's own.
module edc_data_dec
  import edc_pkg::*;
#(
  parameter bit PHASE_SHIFT = 1'b1
) (
  input  logic [MODE_W-1:0]    mode,
  input  logic [BUS_W-1:0]     bus,
  input  logic                 phase,
  output logic [PAYLOAD_W-1:0] payload,
  output edc_status_t          status
);

  logic [BUS_W-1:0] code;
  logic [10:0]      a, b, c;
  logic [7:0]       l8;
  logic [6:0]       l7;
  logic             s;

  always_comb begin
    code = bus;
    if (PHASE_SHIFT) code[PHASE_BIT] = bus[PHASE_BIT] ^ phase;
    payload = '0;
    status  = '0;
    {a, b, c} = code;
    l8 = '0;
    l7 = '0;
    s  = 1'b0;
    unique case (mode)
      MODE_PARITY_ARQ: begin
        payload          = code[31:0];
        status.detected  = ^code;
      end
      MODE_REP3: begin
        payload[10:0]    = (a & b) | (a & c) | (b & c);
        status.corrected = (a != b) || (a != c);
      end
      MODE_SIGN3: begin
        for (int i = 0; i < 4; i++) begin
          l8 = code[8*i +: 8];
          s  = maj3(l8[7], l8[6], l8[5]);
          payload[6*i +: 6] = {s, l8[4:0]};
          if (!(l8[7] == l8[6] && l8[6] == l8[5])) status.corrected = 1'b1;
        end
      end
      MODE_PARITY_PUNCT: begin
        for (int i = 0; i < 4; i++) begin
          l7 = code[7*i +: 7];
          if (^l7) status.punctured = 1'b1;
          else     payload[6*i +: 6] = l7[5:0];
        end
      end
      MODE_SIGN2_PUNCT: begin
        for (int i = 0; i < 4; i++) begin
          l7 = code[7*i +: 7];
          if (l7[6] != l7[5]) status.punctured = 1'b1;
          else                payload[6*i +: 6] = l7[5:0];
        end
      end
      default: payload = code[31:0];
    endcase
  end

endmodule
