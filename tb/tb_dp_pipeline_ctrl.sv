// Testbench for dp_pipeline_ctrl: hold in the detection cycle, retry in the
// next, commit low in both, errors ignored during a rollback, rollback count.
module tb_dp_pipeline_ctrl;
  localparam int NREG = 4;
  logic clk = 0, rst_n = 0;
  logic [NREG-1:0] err_vec = '0;
  logic global_err, hold, retry, commit;
  logic [31:0] rollbacks;
  int checks = 0, failures = 0;
  int exp_rb = 0;

  dp_pipeline_ctrl #(.NREG(NREG), .CNT_W(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: state bit "in retry"
  bit ref_retry;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    ref_retry = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      err_vec = (($urandom % 5) == 0) ? NREG'(1 << ($urandom % NREG)) : '0;
      #1;
      chk(global_err == (err_vec != 0), "global error is OR");
      chk(hold == (!ref_retry && err_vec != 0), "hold");
      chk(retry == ref_retry, "retry");
      chk(commit == !(hold || retry), "commit");
      @(posedge clk);
      if (!ref_retry && err_vec != 0) begin ref_retry = 1; exp_rb++; end
      else ref_retry = 0;
    end
    #1;
    chk(rollbacks == 32'(exp_rb), "rollback count");
    chk(exp_rb > 50, "rollbacks exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
