// Testbench for ts_turbo_slave: starts a frame over the bus interface, acts
// as a noise-free channel (bit 0 -> +20, bit 1 -> -20, two cycles of
// latency), reads the soft-value buffer back and compares it with the
// triples seen on the channel port, makes hard decisions on the systematic
// values and writes them back as decoded words; the error monitor must count
// one frame without errors. A second frame is written back with known bit
// errors.
module tb_ts_turbo_slave;
  localparam int K = 512;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hready = 1, wvalid = 0, core_ready, chan_valid, chan_llr_valid, llr_ready;
  logic [31:0] haddr = '0, wpayload = '0, rpayload, frames, bit_errors, frame_errors;
  logic [2:0] chan_bits;
  logic [2:0][5:0] chan_llr;
  int checks = 0, failures = 0;

  ts_turbo_slave #(.K(K)) dut (.*);

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

  task automatic bus_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a;
    @(negedge clk); hsel = 0; wpayload = d; wvalid = 1;
    @(negedge clk); wvalid = 0;
  endtask
  task automatic bus_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a;
    @(negedge clk); hsel = 0; #1; d = rpayload;
  endtask

  // channel model and record of what was sent
  logic [2:0] sent [$];
  logic [2:0] pipe1, pipe2;
  logic v1 = 0, v2 = 0;
  function automatic logic [5:0] map(input logic b);
    return b ? 6'(-20) : 6'd20;
  endfunction
  always @(posedge clk) begin
    if (chan_valid) sent.push_back(chan_bits);
    v1 <= chan_valid; pipe1 <= chan_bits;
    v2 <= v1;         pipe2 <= pipe1;
  end
  assign chan_llr_valid = v2;
  assign chan_llr = {map(pipe2[2]), map(pipe2[1]), map(pipe2[0])};

  logic [31:0] r;
  logic [31:0] dec [K/32];
  int wait_cycles;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    bus_read(32'h14, r);
    chk(r == K, "K register");
    bus_write(32'h4, 32'h1357_9BDF);   // seed
    bus_write(32'h0, 32'h1);           // start
    wait_cycles = 0;
    do begin
      bus_read(32'h0, r);
      wait_cycles++;
    end while (!r[1] && wait_cycles < 5000);
    chk(r[1] && !r[0], "soft values complete, not busy");
    chk(sent.size() == K + 4, "K+4 channel triples");
    for (int n = 0; n < K + 4; n++) begin
      bus_read(32'h2000 + 32'(4 * n), r);
      chk(r == {14'b0, map(sent[n][2]), map(sent[n][1]), map(sent[n][0])}, $sformatf("soft word %0d", n));
      // hard decision on the systematic value
      if (n < K) dec[n / 32][n % 32] = r[5];
    end
    for (int w = 0; w < K / 32; w++) bus_write(32'h1000 + 32'(4 * w), dec[w]);
    bus_read(32'h8, r);  chk(r == 1, "one frame");
    bus_read(32'hC, r);  chk(r == 0, "no bit errors");
    bus_read(32'h10, r); chk(r == 0, "no frame errors");
    // same frame again with three wrong bits
    dec[3] ^= 32'h0000_0101;
    dec[15] ^= 32'h8000_0000;
    for (int w = 0; w < K / 32; w++) bus_write(32'h1000 + 32'(4 * w), dec[w]);
    bus_read(32'h8, r);  chk(r == 2, "two frames");
    bus_read(32'hC, r);  chk(r == 3, "three bit errors");
    bus_read(32'h10, r); chk(r == 1, "one frame error");
    bus_write(32'h0, 32'h2);           // clear
    bus_read(32'h8, r);  chk(r == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
