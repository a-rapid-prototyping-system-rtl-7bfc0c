// Testbench for ts_error_monitor: random frames of 16 words with random bit
// errors; bit, frame and frame-error counts against a model; clear.
module tb_ts_error_monitor;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, last = 0;
  logic [31:0] src_word = '0, dec_word = '0, frames, bit_errors, frame_errors;
  int checks = 0, failures = 0;
  int e_frames = 0, e_bits = 0, e_ferr = 0;

  ts_error_monitor #(.CNT_W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
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
    for (int f = 0; f < 200; f++) begin
      bit bad;
      bad = 0;
      for (int w = 0; w < 16; w++) begin
        logic [31:0] e;
        e = '0;
        @(negedge clk);
        if (f % 3 == 0 && ($urandom % 4) == 0) begin
          e = 32'(1) << ($urandom % 32);
          if ($urandom % 2) e |= 32'(1) << ($urandom % 32);
        end
        valid = ($urandom % 5) != 0;
        while (!valid) begin
          @(negedge clk);
          valid = 1;
        end
        src_word = $urandom;
        dec_word = src_word ^ e;
        last = (w == 15);
        e_bits += $countones(e);
        if (e != 0) bad = 1;
      end
      @(negedge clk);
      valid = 0; last = 0;
      e_frames++;
      if (bad) e_ferr++;
      #1;
      chk(frames == 32'(e_frames) && bit_errors == 32'(e_bits) && frame_errors == 32'(e_ferr), "statistics");
    end
    chk(e_ferr > 20 && e_ferr < e_frames, "both kinds of frames");
    clear = 1;
    @(negedge clk);
    clear = 0;
    chk(frames == 0 && bit_errors == 0 && frame_errors == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
