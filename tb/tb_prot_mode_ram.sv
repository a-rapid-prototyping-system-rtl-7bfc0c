// Testbench for prot_mode_ram: start-up contents (mode 1 codeword), random
// writes and registered reads against an array model, read enable.
module tb_prot_mode_ram;
  localparam int SEG_W = 6;
  logic clk = 0, re = 0, we = 0;
  logic [SEG_W-1:0] raddr = '0, waddr = '0;
  logic [6:0] rdata, wdata = '0;
  logic [6:0] model [1 << SEG_W];
  logic [6:0] last;
  int checks = 0, failures = 0;

  prot_mode_ram #(.SEG_W(SEG_W)) dut (.*);

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
    // mode 1 = 4'b0001 -> codeword bits m0 at 2, p1 at 0, p2 at 1
    for (int i = 0; i < (1 << SEG_W); i++) model[i] = 7'b000_0111;
    for (int i = 0; i < (1 << SEG_W); i++) begin
      @(negedge clk); re = 1; raddr = SEG_W'(i);
      @(negedge clk); re = 0;
      chk(rdata == model[i], "start-up contents");
    end
    last = rdata;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom % 2; waddr = SEG_W'($urandom); wdata = 7'($urandom);
      re = $urandom % 2; raddr = SEG_W'($urandom);
      @(posedge clk);
      if (re) last = model[raddr];
      if (we) model[waddr] = wdata;
      #1;
      chk(rdata == last, "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
