// Testbench for cfc_checker: a fetch model runs a small program with
// sequential code, a direct call and return, an indirect jump, an indirect
// call and return, a conditional branch and a jump, all entered in the CFIG.
// Next-PC values are corrupted at random; each corruption must be flagged
// in the next cycle with the address of the instruction to re-execute, the
// fetch model re-fetches it, and the program must continue correctly with
// one lost cycle per corruption.
module tb_cfc_checker;
  import cfc_pkg::*;
  localparam int AW = 32, IDX_W = 6;
  logic clk = 0, rst_n = 0, check_en = 0, advance = 0;
  logic [AW-1:0] pc_n, pc_next, reexec_pc;
  logic reexec;
  logic [31:0] errors, checked, unchecked;
  logic [15:0] stack_overflows;
  logic cfig_we = 0;
  logic [IDX_W-1:0] cfig_waddr = '0;
  cfi_kind_e cfig_wkind = CFI_NONE;
  logic [AW-1:0] cfig_wtarget = '0;
  int checks = 0, failures = 0;

  cfc_checker #(.AW(AW), .IDX_W(IDX_W), .BASE(32'h0), .STACK_DEPTH(4)) dut (.*);

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

  task automatic load(input logic [AW-1:0] a, input cfi_kind_e k, input logic [AW-1:0] t);
    @(negedge clk);
    cfig_we = 1; cfig_waddr = IDX_W'(a >> 2); cfig_wkind = k; cfig_wtarget = t;
    @(negedge clk);
    cfig_we = 0;
  endtask

  // reference program: the correct successor of each address
  logic [AW-1:0] ret_model[$];
  function automatic logic [AW-1:0] succ(input logic [AW-1:0] pc, input bit taken);
    case (pc)
      32'h10: return 32'h80;                 // call
      32'h8c: return 32'h14;                 // return (model stack)
      32'h14: return 32'h18;                 // indirect jump, to 0x18
      32'h18: return 32'h90;                 // indirect call
      32'h90: return 32'h1c;                 // return
      32'h20: return taken ? 32'h0 : 32'h24; // branch
      32'h24: return 32'h0;                  // jump
      default: return pc + 4;
    endcase
  endfunction

  logic [AW-1:0] fetch_pc, good_next;
  bit corrupt_q;
  logic [AW-1:0] corrupt_pc_q;
  int n_corrupt = 0, n_flag = 0, cycles = 0, insns = 0;

  assign pc_n = fetch_pc;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    load(32'h10, CFI_CALL, 32'h80);
    load(32'h8c, CFI_RET, 32'h0);
    load(32'h14, CFI_JUMP_IND, 32'h0);
    load(32'h18, CFI_CALL_IND, 32'h0);
    load(32'h90, CFI_RET, 32'h0);
    load(32'h20, CFI_BRANCH, 32'h0);
    load(32'h24, CFI_JUMP, 32'h0);
    @(negedge clk);
    fetch_pc = 32'h0;
    check_en = 1;
    advance = 0;
    corrupt_q = 0;
    // let the entry of the first address be read
    pc_next = fetch_pc;
    @(negedge clk);
    advance = 1;
    for (int n = 0; n < 3000; n++) begin
      // checker reply for the previous cycle
      chk(reexec == corrupt_q, "re-execution requested exactly after a corruption");
      if (reexec) begin
        n_flag++;
        chk(reexec_pc == corrupt_pc_q, "re-execution address");
        pc_next = reexec_pc;                 // squash the wrong fetch, re-fetch
        corrupt_q = 0;
      end else begin
        good_next = succ(fetch_pc, ($urandom % 4) != 0);
        pc_next = good_next;
        corrupt_q = 0;
        // corrupt only where the checker can see it (not indirect jump/call)
        if (fetch_pc != 32'h14 && fetch_pc != 32'h18 && ($urandom % 10) == 0) begin
          pc_next = good_next ^ 32'h0000_0100;
          corrupt_q = 1;
          corrupt_pc_q = fetch_pc;
          n_corrupt++;
        end else insns++;
      end
      @(negedge clk);
      cycles++;
      fetch_pc = pc_next;
    end
    chk(errors == 32'(n_corrupt), "error count");
    chk(n_flag == n_corrupt || n_flag == n_corrupt - 1, "all flagged");
    chk(n_corrupt > 50, "corruptions exercised");
    chk(unchecked == 0, "every instruction checked");
    // each corruption costs exactly one cycle
    chk(cycles == insns + 2 * n_corrupt - (n_corrupt - n_flag), "one lost cycle per error");
    $display("corruptions=%0d checked=%0d", n_corrupt, checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
