// Testbench for ts_turbo_enc: random frames of K = 512 bits (the block
// length of the evaluated code) and of K = 40 (F1 = 3, F2 = 10) are encoded
// and every output triple, including the tail triples, is compared with a
// reference that applies the interleaver formula and the two recursive
// convolutional codes directly. The frame must take K + 7 cycles after
// loading, with K + 4 output triples.
module tb_ts_turbo_enc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_bit = 0;
  logic busy_a, ov_a, sys_a, p1_a, p2_a, last_a;
  logic busy_b, ov_b, sys_b, p1_b, p2_b, last_b;
  logic sel = 0;

  ts_turbo_enc #(.K(512), .F1(31), .F2(64)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && !sel), .in_bit(in_bit),
    .busy(busy_a), .out_valid(ov_a), .out_sys(sys_a), .out_p1(p1_a), .out_p2(p2_a), .out_last(last_a));
  ts_turbo_enc #(.K(40), .F1(3), .F2(10)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid && sel), .in_bit(in_bit),
    .busy(busy_b), .out_valid(ov_b), .out_sys(sys_b), .out_p1(p1_b), .out_p2(p2_b), .out_last(last_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference: returns the triples {sys, p1, p2} of one frame
  logic [2:0] ref_out [$];
  bit cbuf [1024];
  task automatic reference(input int K, input int F1, input int F2);
    logic [2:0] r1, r2;   // shift registers, bit 0 newest
    logic a;
    logic [2:0] x1, z1, x2, z2;
    ref_out.delete();
    r1 = '0;
    r2 = '0;
    for (int k = 0; k < K; k++) begin
      longint p;
      logic ci, z1b, z2b;
      p = (longint'(F1) * k + longint'(F2) * k * k) % K;
      ci = cbuf[int'(p)];
      // feedback g0 = 1 + D^2 + D^3, parity g1 = 1 + D + D^3
      a = cbuf[k] ^ r1[1] ^ r1[2];
      z1b = a ^ r1[0] ^ r1[2];
      r1 = {r1[1:0], a};
      a = ci ^ r2[1] ^ r2[2];
      z2b = a ^ r2[0] ^ r2[2];
      r2 = {r2[1:0], a};
      ref_out.push_back({cbuf[k], z1b, z2b});
    end
    for (int t = 0; t < 3; t++) begin
      x1[t] = r1[1] ^ r1[2]; z1[t] = r1[0] ^ r1[2];   // register input 0
      r1 = {r1[1:0], 1'b0};
      x2[t] = r2[1] ^ r2[2]; z2[t] = r2[0] ^ r2[2];
      r2 = {r2[1:0], 1'b0};
    end
    ref_out.push_back({x1[0], z1[0], x1[1]});
    ref_out.push_back({z1[1], x1[2], z1[2]});
    ref_out.push_back({x2[0], z2[0], x2[1]});
    ref_out.push_back({z2[1], x2[2], z2[2]});
  endtask

  task automatic run_frame(input int K, input int F1, input int F2, input bit which);
    int got = 0, cyc = 0;
    bit o_v, o_s, o_1, o_2, o_l;
    for (int i = 0; i < K; i++) cbuf[i] = 1'($urandom);
    reference(K, F1, F2);
    sel = which;
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      in_valid = 1; in_bit = cbuf[i];
    end
    @(negedge clk);
    in_valid = 0;
    // count cycles from the first encoding cycle to the last output
    forever begin
      cyc++;
      {o_v, o_s, o_1, o_2, o_l} = which ? {ov_b, sys_b, p1_b, p2_b, last_b} : {ov_a, sys_a, p1_a, p2_a, last_a};
      if (o_v) begin
        chk(got < ref_out.size() && {o_s, o_1, o_2} == ref_out[got],
            $sformatf("K=%0d triple %0d", K, got));
        got++;
        if (o_l) break;
      end
      @(negedge clk);
    end
    chk(got == K + 4, $sformatf("K=%0d triple count %0d", K, got));
    chk(cyc == K + 7, $sformatf("K=%0d frame cycles %0d", K, cyc));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) run_frame(512, 31, 64, 0);
    for (int f = 0; f < 5; f++) run_frame(40, 3, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
