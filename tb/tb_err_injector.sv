// Testbench for err_injector: no hits at rate zero, hit rate close to
// thr/2^16 per line, lines hit independently, flip and delay behaviour,
// and the hit counter.
module tb_err_injector;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, en = 0, delay_mode = 0;
  logic [15:0] thr = '0;
  logic [W-1:0] din = '0, dout, mask;
  logic [31:0] hits;
  int checks = 0, failures = 0;
  int line_hits [W];
  int both = 0, any_cycles = 0;
  logic [W-1:0] din_prev;

  err_injector #(.W(W), .THR_W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
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
    en = 1;
    // rate zero
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); din = W'($urandom); #1;
      chk(dout == din && mask == 0, "no injection at rate zero");
    end
    // rate 1/16 in flip mode
    thr = 16'h1000;
    for (int i = 0; i < W; i++) line_hits[i] = 0;
    for (int n = 0; n < 16000; n++) begin
      @(negedge clk); din = W'($urandom); #1;
      checks++;
      if (dout != (din ^ mask)) begin failures++; $display("FAIL flip"); end
      for (int i = 0; i < W; i++) line_hits[i] += int'(mask[i]);
      if (mask[0] && mask[1]) both++;
      if (mask != 0) any_cycles++;
    end
    for (int i = 0; i < W; i++)
      chk(line_hits[i] > 800 && line_hits[i] < 1200, $sformatf("rate of line %0d: %0d/16000", i, line_hits[i]));
    // independent lines: joint hits near 1/256 of the cycles
    chk(both > 20 && both < 120, $sformatf("joint hits %0d", both));
    #1;
    // delay mode: a hit line carries the previous cycle's value
    delay_mode = 1;
    thr = 16'h4000;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din_prev = din;
      din = W'($urandom); #1;
      for (int i = 0; i < W; i++)
        chk(dout[i] == (mask[i] ? din_prev[i] : din[i]), "delay injection");
      if (mask != 0) any_cycles++;
    end
    @(posedge clk); #1;
    chk(hits == 32'(any_cycles), "hit counter");
    en = 0; #1;
    chk(mask == 0 && dout == din, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
