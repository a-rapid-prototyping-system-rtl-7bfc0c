// Testbench for edc_master: write encoding and read decoding in every mode
// with the phase bit, mode codeword correction, mode writes, and the read
// ARQ (request in the same cycle as a parity error, at most ARQ_MAX per
// data phase).
module tb_edc_master;
  import edc_pkg::*;
  import tb_edc_ref::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] wpayload = '0, rpayload;
  edc_status_t rstatus;
  logic rvalid, mode_set = 0, mode_we;
  logic [10:0] mode_set_seg = '0, mode_wseg;
  logic [3:0] mode_set_val = '0, cur_mode;
  logic [6:0] mode_wcw, prot_mode_cw = '0;
  logic dp_mine = 0, dp_write = 0, hready = 1, arq;
  logic [32:0] hwdata, hrdata = '0;
  logic [31:0] cnt_corrected, cnt_detected, cnt_punctured, cnt_arq, cnt_mode_corrected;
  int checks = 0, failures = 0;
  bit phase = 0;
  int exp_arq = 0, exp_mc = 0;
  bit flipped = 0;
  always @(posedge clk) if (dp_mine && hready && flipped) exp_mc++;

  edc_master #(.SEG_W(11), .ARQ_MAX(3)) dut (.*);

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
      flipped = 0;
      if (($urandom % 8) == 0) begin
        prot_mode_cw ^= 7'(1) << ($urandom % 7);
        flipped = 1;
      end
      dp_mine = 1;
      dp_write = $urandom % 2;
      wpayload = $urandom;
      hrdata = layout(m, wpayload) ^ {32'b0, phase};
      hready = 1;
      #1;
      chk(cur_mode == 4'(m), "mode decoded");
      if (dp_write) begin
        chk(hwdata == (layout(m, wpayload) ^ {32'b0, phase}), "write encoding");
        chk(!arq && !rvalid, "no read activity on write");
      end else begin
        chk(rvalid && rpayload == plain(m, wpayload) && !arq, "read decoding");
        if (m == 0) begin
          // parity error: ARQ asked up to three times, then the word is taken
          for (int r = 0; r < 4; r++) begin
            hrdata ^= 33'(1) << ($urandom % 33);
            #1;
            chk(arq == (r < 3), "ARQ on parity error");
            if (r == 3) chk(rvalid && rstatus.detected, "limit reached, word taken with error");
            if (arq) exp_arq++;
            hready = !arq;
            @(negedge clk);
            hrdata = layout(m, wpayload) ^ {32'b0, phase};
            hready = 1;
          end
        end
      end
    end
    @(negedge clk);
    dp_mine = 0;
    flipped = 0;
    mode_set = 1; mode_set_seg = 11'h2A5; mode_set_val = 4'd3;
    #1;
    chk(mode_we && mode_wseg == 11'h2A5 && mode_wcw == mode_cw(4'd3), "mode write");
    @(negedge clk);
    mode_set = 0;
    chk(cnt_arq == 32'(exp_arq) && exp_arq > 10, "ARQ count");
    chk(cnt_mode_corrected == 32'(exp_mc) && exp_mc > 10, "mode correction count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
