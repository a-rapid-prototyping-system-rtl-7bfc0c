// Reference coding functions for the EDC testbenches, written from the
// mode table independently of the design's package.
package tb_edc_ref;

  function automatic logic [32:0] layout(input int m, input logic [31:0] p);
    logic [32:0] w = '0;
    logic [5:0] v;
    case (m)
      0: w = {^p, p};
      2: w = {p[10:0], p[10:0], p[10:0]};
      3: for (int i = 0; i < 4; i++) begin v = p[6*i +: 6]; w[8*i +: 8] = {v[5], v[5], v}; end
      4: for (int i = 0; i < 4; i++) begin v = p[6*i +: 6]; w[7*i +: 7] = {^v, v}; end
      5: for (int i = 0; i < 4; i++) begin v = p[6*i +: 6]; w[7*i +: 7] = {v[5], v}; end
      default: w = {1'b0, p};
    endcase
    return w;
  endfunction

  function automatic logic [31:0] plain(input int m, input logic [31:0] p);
    case (m)
      2: return {21'b0, p[10:0]};
      3, 4, 5: return {8'b0, p[23:0]};
      default: return p;
    endcase
  endfunction

  function automatic logic [6:0] mode_cw(input logic [3:0] m);
    return {m[3], m[2], m[1], m[1] ^ m[2] ^ m[3], m[0], m[0] ^ m[2] ^ m[3], m[0] ^ m[1] ^ m[3]};
  endfunction

endpackage
