// Testbench for edc_mode_dec: every mode identifier, encoded here by the
// Hamming (7,4) parity equations, with no error and with each single-bit
// error; the decoder must return the identifier and flag the correction.
module tb_edc_mode_dec;
  logic [6:0] mode_cw;
  logic [3:0] mode;
  logic corrected;
  int checks = 0, failures = 0;

  edc_mode_dec dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [6:0] enc(input logic [3:0] m);
    return {m[3], m[2], m[1], m[1] ^ m[2] ^ m[3], m[0], m[0] ^ m[2] ^ m[3], m[0] ^ m[1] ^ m[3]};
  endfunction

  initial begin
    for (int m = 0; m < 16; m++) begin
      for (int e = -1; e < 7; e++) begin
        mode_cw = enc(4'(m));
        if (e >= 0) mode_cw[e] = ~mode_cw[e];
        #1;
        chk(mode == 4'(m), $sformatf("mode %0d error bit %0d", m, e));
        chk(corrected == (e >= 0), "corrected flag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
