// Testbench for edc_data_enc and edc_data_dec: for every protection mode,
// random payloads are encoded, the bus word is checked against the mode's
// layout written out here, single-bit errors are added, and the decoded
// payload and status are compared with what the mode promises (detection
// for parity, correction for the votes, zeroed values for puncturing). The
// phase bit is checked at both values, and a decoder running in the wrong
// phase must see an error in parity mode.
module tb_edc_data_codec;
  import edc_pkg::*;
  logic [3:0]  mode;
  logic [31:0] payload_in, payload_out;
  logic        phase_tx, phase_rx;
  logic [32:0] bus, bus_err;
  edc_status_t status;
  int checks = 0, failures = 0;

  edc_data_enc u_enc (.mode(mode), .payload(payload_in), .phase(phase_tx), .bus(bus));
  edc_data_dec u_dec (.mode(mode), .bus(bus_err), .phase(phase_rx), .payload(payload_out), .status(status));

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s mode %0d payload %h bus %h", what, mode, payload_in, bus_err); end
  endtask

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

  function automatic logic [31:0] expect_plain(input int m, input logic [31:0] p);
    case (m)
      2: return {21'b0, p[10:0]};
      3, 4, 5: return {8'b0, p[23:0]};
      default: return p;
    endcase
  endfunction

  initial begin
    for (int m = 0; m < 8; m++) begin
      mode = 4'(m);
      for (int n = 0; n < 200; n++) begin
        payload_in = $urandom;
        phase_tx = n[0];
        phase_rx = n[0];
        bus_err = 'x;
        #1;
        chk(bus == (layout(m, payload_in) ^ {32'b0, phase_tx}), "bus layout");
        bus_err = bus;
        #1;
        chk(payload_out == expect_plain(m, payload_in) && status == '0, "clean decode");
        // one flipped line
        begin
          int b;
          logic [31:0] expv;
          b = $urandom % 33;
          bus_err = bus ^ (33'(1) << b);
          #1;
          expv = expect_plain(m, payload_in);
          case (m)
            0: chk(status.detected, "parity detects");
            2: chk(payload_out == expv && status.corrected, "vote corrects");
            3: begin
              if (b < 32 && (b % 8) >= 5)
                chk(payload_out == expv && status.corrected, "sign vote corrects");
              else if (b < 32)
                chk(status.corrected == 0 && (payload_out ^ expv) != 0, "magnitude error passes");
              else
                chk(payload_out == expv, "unused line ignored");
            end
            4: begin
              if (b < 28) begin
                expv[6*(b/7) +: 6] = '0;
                chk(payload_out == expv && status.punctured, "parity punctures");
              end else chk(payload_out == expv && !status.punctured, "unused line ignored");
            end
            5: begin
              if (b < 28 && (b % 7) >= 5) begin
                expv[6*(b/7) +: 6] = '0;
                chk(payload_out == expv && status.punctured, "sign mismatch punctures");
              end else if (b >= 28) chk(payload_out == expv, "unused line ignored");
            end
            default: ;
          endcase
        end
        // receiver one phase off (a bus late by a whole cycle)
        if (m == 0) begin
          bus_err = bus;
          phase_rx = ~phase_tx;
          #1;
          chk(status.detected, "phase shift exposes a late word");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
