// Testbench for edc_mode_enc: every mode identifier, codeword checked
// against the parity equations of the Hamming (7,4) code written out here,
// and every pair of codewords at distance three or more.
module tb_edc_mode_enc;
  logic [3:0] mode;
  logic [6:0] mode_cw;
  logic [6:0] cws [16];
  int checks = 0, failures = 0;

  edc_mode_enc dut (.*);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int m = 0; m < 16; m++) begin
      mode = 4'(m);
      #1;
      cws[m] = mode_cw;
      chk(mode_cw[2] == mode[0] && mode_cw[4] == mode[1] && mode_cw[5] == mode[2] && mode_cw[6] == mode[3],
          $sformatf("data bits of mode %0d", m));
      chk((mode_cw[0] ^ mode_cw[2] ^ mode_cw[4] ^ mode_cw[6]) == 0, "p1 equation");
      chk((mode_cw[1] ^ mode_cw[2] ^ mode_cw[5] ^ mode_cw[6]) == 0, "p2 equation");
      chk((mode_cw[3] ^ mode_cw[4] ^ mode_cw[5] ^ mode_cw[6]) == 0, "p4 equation");
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        chk($countones(cws[a] ^ cws[b]) >= 3, "minimum distance");
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
