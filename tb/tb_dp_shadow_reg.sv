// Testbench for dp_shadow_reg: normal capture, error flag one cycle after a
// faulty capture (main or shadow), hold and the history path under retry.
module tb_dp_shadow_reg;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, hold = 0, retry = 0;
  logic [W-1:0] d = '0, inj_main = '0, inj_shadow = '0, q, q_main;
  logic err;
  int checks = 0, failures = 0;

  dp_shadow_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [W-1:0] prev, cur;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    prev = '0; cur = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d = W'($urandom);
      @(posedge clk); #1;
      prev = cur; cur = d;
      chk(q == cur && !err, "normal capture");
    end
    // fault in the main register: flagged after the capture edge
    @(negedge clk); d = 16'h1234; inj_main = 16'h0100;
    @(posedge clk); #1; inj_main = '0;
    chk(err, "main fault flagged");
    chk(q == (16'h1234 ^ 16'h0100), "faulty value visible");
    // detection cycle: hold keeps everything
    hold = 1; d = 16'hFFFF;
    @(posedge clk); #1; hold = 0;
    chk(err && q_main == (16'h1234 ^ 16'h0100), "hold keeps main");
    // correction cycle: history (the value before the fault) is presented
    retry = 1; #1;
    chk(q == cur, "history under retry");
    d = 16'h1234;
    @(posedge clk); #1; retry = 0; #1;
    chk(!err, "no error after retry");
    chk(q == 16'h1234, $sformatf("recaptured after retry %h", q));
    @(negedge clk); d = 16'h4321;
    @(posedge clk); #1;
    chk(q == 16'h4321 && !err, "normal after rollback");
    // retry right after: history must be 16'h1234 (the last good value)
    retry = 1; #1;
    chk(q == 16'h1234, "history follows main");
    retry = 0;
    // fault in the shadow register is flagged too
    @(negedge clk); d = 16'h00AA; inj_shadow = 16'h8000;
    @(posedge clk); #1; inj_shadow = '0;
    chk(err && q == 16'h00AA, "shadow fault flagged");
    @(negedge clk);
    @(posedge clk); #1;
    chk(!err, "shadow fault cleared by next capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
