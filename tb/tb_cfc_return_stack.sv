// Testbench for cfc_return_stack: random push/pop against a queue model,
// including overflow (oldest entry dropped) and pops of an empty stack.
module tb_cfc_return_stack;
  localparam int AW = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [AW-1:0] push_addr = '0, top;
  logic empty;
  logic [15:0] overflows;
  int checks = 0, failures = 0;
  logic [AW-1:0] model[$];
  int exp_ovf = 0;

  cfc_return_stack #(.AW(AW), .DEPTH(DEPTH), .CNT_W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
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
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty");
      if (model.size() != 0) chk(top == model[$], "top");
      // phases: mostly pushes, then mostly pops, to reach full and empty
      push = ((n / 200) % 2 == 0) ? (($urandom % 4) != 0) : (($urandom % 4) == 0);
      pop  = ($urandom % 2) == 1;
      push_addr = $urandom;
      @(posedge clk);
      if (push && pop && model.size() != 0) model[$] = push_addr;
      else if (push) begin
        model.push_back(push_addr);
        if (model.size() > DEPTH) begin void'(model.pop_front()); exp_ovf++; end
      end else if (pop && model.size() != 0) void'(model.pop_back());
    end
    #1;
    chk(overflows == 16'(exp_ovf), "overflow count");
    chk(exp_ovf > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
