// Testbench for edc_slave: read encoding and write decoding in every mode
// with the phase bit, the write ARQ wait state on a parity error (at most
// ARQ_MAX per data phase), the wait state on a master's read ARQ request,
// and the slave's own wait states passed through.
module tb_edc_slave;
  import edc_pkg::*;
  import tb_edc_ref::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] rpayload = '0, wpayload;
  logic core_ready = 1, wvalid, dp_sel = 0, dp_write = 0, hready, arq_in = 0, hready_out;
  logic mode_corrected;
  edc_status_t wstatus;
  logic [6:0] prot_mode_cw = '0;
  logic [32:0] hwdata = '0, hrdata;
  logic [31:0] cnt_corrected, cnt_detected, cnt_punctured, cnt_arq;
  int checks = 0, failures = 0;
  bit phase = 0;
  int exp_arq = 0;

  assign hready = hready_out;
  edc_slave #(.ARQ_MAX(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) phase <= rst_n ? ~phase : 1'b0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      int m;
      @(negedge clk);
      m = $urandom % 6;
      prot_mode_cw = mode_cw(4'(m));
      dp_sel = 1;
      dp_write = $urandom % 2;
      rpayload = $urandom;
      hwdata = layout(m, rpayload) ^ {32'b0, phase};
      arq_in = 0;
      core_ready = ($urandom % 8) != 0;
      #1;
      chk(mode_corrected == 0, "clean mode codeword");
      chk(hready_out == core_ready, "slave wait states passed through");
      core_ready = 1;
      #1;
      if (dp_write) begin
        chk(wvalid && wpayload == plain(m, rpayload) && wstatus == '0, "write decoding");
        if (m == 0) begin
          for (int r = 0; r < 4; r++) begin
            hwdata ^= 33'(1) << ($urandom % 33);
            #1;
            chk(hready_out == (r == 3), "write ARQ wait state");
            chk(wvalid == (r == 3), "write taken only after the limit");
            if (!hready_out) exp_arq++;
            @(negedge clk);
            hwdata = layout(m, rpayload) ^ {32'b0, phase};
          end
        end
      end else begin
        chk(hrdata == (layout(m, rpayload) ^ {32'b0, phase}) && !wvalid, "read encoding");
        arq_in = 1;
        #1;
        chk(!hready_out, "wait state on read ARQ");
      end
    end
    @(negedge clk);
    chk(cnt_arq == 32'(exp_arq) && exp_arq > 10, "ARQ count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
