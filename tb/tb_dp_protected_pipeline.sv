// Testbench for dp_protected_pipeline: a fetch model and four stage
// functions around the protected registers. Faults are injected into the
// main registers at random; every value must reach write-back exactly once,
// in order, correct, and each fault must cost exactly two cycles.
module tb_dp_protected_pipeline;
  localparam int NREG = 4, W = 32, N = 400;
  logic clk = 0, rst_n = 0;
  logic [NREG-1:0][W-1:0] d, inj_main, inj_shadow, q;
  logic [NREG-1:0] err_vec;
  logic hold, retry, commit;
  logic [31:0] rollbacks;
  int checks = 0, failures = 0;

  dp_protected_pipeline #(.NREG(NREG), .W(W)) dut (.*);

  always #5 clk = ~clk;
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

  function automatic logic [W-1:0] stage(input int i, input logic [W-1:0] x);
    return (x * 32'd3) ^ (32'h9E37_0000 + 32'(i));
  endfunction

  // fetch stage: a counter with history, obeying hold and retry
  logic [W-1:0] pc, pc_hist, pc_out;
  assign pc_out = retry ? pc_hist : pc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin pc <= 32'd0; pc_hist <= 32'd0; end
    else if (!hold) begin
      pc <= pc_out + 1;
      if (!retry) pc_hist <= pc;
    end
  end

  always_comb begin
    d[0] = stage(0, pc_out);
    for (int i = 1; i < NREG; i++) d[i] = stage(i, q[i-1]);
  end
  assign inj_shadow = '0;

  function automatic logic [W-1:0] expect_of(input logic [W-1:0] p);
    logic [W-1:0] x = p;
    for (int i = 0; i < NREG; i++) x = stage(i, x);
    return x;
  endfunction

  int injected = 0, cycles = 0, gap = 0;
  logic [W-1:0] next_pc;  // pc whose result write-back expects next
  bit started = 0;

  always @(negedge clk) begin
    inj_main = '0;
    if (rst_n && !hold && !retry && gap > 3 && ($urandom % 7) == 0 && next_pc < N - 8) begin
      inj_main[$urandom % NREG] = W'(1) << ($urandom % W);
      injected++;
      gap = 0;
    end else gap++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    next_pc = 0;
    while (next_pc < N) begin
      @(posedge clk);
      cycles++;
      #1;
      // the first NREG-1 outputs are reset values; q[3] may only be consumed while commit is high
      if (commit && cycles >= NREG) begin
        chk(q[NREG-1] == expect_of(next_pc), $sformatf("write-back value for pc %0d", next_pc));
        next_pc++;
      end
    end
    // zero faults: value k appears after k+NREG edges; each rollback adds 2
    chk(cycles == N + NREG - 1 + 2 * injected, $sformatf("cycle count %0d vs %0d", cycles, N + NREG - 1 + 2 * injected));
    chk(rollbacks == 32'(injected), "one rollback per fault");
    chk(injected > 20, "faults injected");
    $display("faults=%0d rollbacks=%0d cycles=%0d", injected, rollbacks, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
