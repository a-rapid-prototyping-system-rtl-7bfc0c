// Constants, types and coding functions of the protected AHB data bus.
//
// The data bus is 33 bits wide in each direction. What the 33 bits carry
// depends on the protection mode of the memory segment being accessed:
//   0  parity bit + ARQ      32-bit payload, bit 32 = even parity
//   1  no protection         32-bit payload, bit 32 unused (0)
//   2  3x repetition, vote   11-bit payload, three copies in bits 32:0
//   3  sign bit 3x, vote     four 6-bit values, 8 bits each: {s,s,v[5:0]}
//   4  parity, puncturing    four 6-bit values, 7 bits each: {^v,v[5:0]}
//   5  sign 2x, puncturing   four 6-bit values, 7 bits each: {v[5],v[5:0]}
//   6..15 reserved; handled as mode 1
// For modes 3..5 the payload holds the values in bits [6i+5:6i], i=0..3,
// as 6-bit two's-complement numbers (soft decoder inputs). A punctured value
// is set to zero, the neutral soft value.
//
// Mode identifiers are stored and distributed as Hamming (7,4) codewords:
// cw[0]=p1, cw[1]=p2, cw[2]=m0, cw[3]=p4, cw[4]=m1, cw[5]=m2, cw[6]=m3, so
// the syndrome {s4,s2,s1} is the 1-based position of a single flipped bit.
package edc_pkg;

  localparam int unsigned BUS_W     = 33;
  localparam int unsigned PAYLOAD_W = 32;
  localparam int unsigned MODE_W    = 4;
  localparam int unsigned MODE_CW_W = 7;
  // data bus bit inverted every second cycle at both ends (phase shifting)
  localparam int unsigned PHASE_BIT = 0;

  typedef enum logic [MODE_W-1:0] {
    MODE_PARITY_ARQ   = 4'd0,
    MODE_NONE         = 4'd1,
    MODE_REP3         = 4'd2,
    MODE_SIGN3        = 4'd3,
    MODE_PARITY_PUNCT = 4'd4,
    MODE_SIGN2_PUNCT  = 4'd5
  } prot_mode_e;

  typedef struct packed {
    logic corrected;   // an error was corrected (vote or Hamming)
    logic detected;    // an error was detected and could not be corrected
    logic punctured;   // at least one soft value was set to zero
  } edc_status_t;

  function automatic logic [MODE_CW_W-1:0] hamming74_enc(input logic [MODE_W-1:0] m);
    logic [MODE_CW_W-1:0] cw;
    cw[2] = m[0];
    cw[4] = m[1];
    cw[5] = m[2];
    cw[6] = m[3];
    cw[0] = m[0] ^ m[1] ^ m[3];
    cw[1] = m[0] ^ m[2] ^ m[3];
    cw[3] = m[1] ^ m[2] ^ m[3];
    return cw;
  endfunction

  function automatic logic [2:0] hamming74_syndrome(input logic [MODE_CW_W-1:0] cw);
    logic s1, s2, s4;
    s1 = cw[0] ^ cw[2] ^ cw[4] ^ cw[6];
    s2 = cw[1] ^ cw[2] ^ cw[5] ^ cw[6];
    s4 = cw[3] ^ cw[4] ^ cw[5] ^ cw[6];
    return {s4, s2, s1};
  endfunction

  function automatic logic [MODE_W-1:0] hamming74_dec(input logic [MODE_CW_W-1:0] cw);
    logic [2:0]           syn;
    logic [MODE_CW_W-1:0] fixed;
    syn   = hamming74_syndrome(cw);
    fixed = cw;
    if (syn != 3'd0) fixed[syn - 3'd1] = ~cw[syn - 3'd1];
    return {fixed[6], fixed[5], fixed[4], fixed[2]};
  endfunction

  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
