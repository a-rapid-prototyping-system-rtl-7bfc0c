// Testbench for ts_data_gen: the bit stream must follow the PRBS31
// recurrence b(n) = b(n-31) xor b(n-28) (with the sequence started from the
// seed), stall while disabled, and be balanced.
module tb_ts_data_gen;
  logic clk = 0, rst_n = 0, load = 0, en = 0, bit_out;
  logic [30:0] seed = '0;
  int checks = 0, failures = 0;
  bit hist[$];
  int ones = 0;
  int gen_pos = 0;

  ts_data_gen dut (.*);

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
    seed = 31'h2345_6789;
    load = 1;
    @(negedge clk);
    load = 0;
    // the first 31 bits are the seed, oldest bit first
    for (int i = 30; i >= 0; i--) hist.push_back(seed[i]);
    for (int n = 0; n < 20000; n++) begin
      en = ($urandom % 8) != 0;
      #1;
      if (en) begin
        // bit n must equal the expected stream position
        if (gen_pos < 31) chk(bit_out == hist[gen_pos], "seed bits");
        else begin
          hist.push_back(hist[gen_pos - 31] ^ hist[gen_pos - 28]);
          chk(bit_out == hist[gen_pos], "PRBS31 recurrence");
        end
        ones += int'(bit_out);
        gen_pos++;
      end
      @(negedge clk);
    end
    chk(ones > gen_pos * 45 / 100 && ones < gen_pos * 55 / 100, "balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
