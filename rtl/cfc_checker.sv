// Control flow checker with re-execution request.
//
// Watches the fetch stage of a processor: `pc_n` is the address in the fetch
// PC register, `pc_next` the address the PC multiplexer selects as the next
// one (PC_n+1). For every instruction it looks up the control flow
// instruction graph (CFIG) entry of pc_n and checks that pc_next is a legal
// successor:
//   no control flow instruction  -> pc_n + 4
//   direct conditional branch    -> target or pc_n + 4
//   direct jump / direct call    -> target (a call pushes pc_n + 4)
//   indirect call                -> anything (pushes pc_n + 4)
//   indirect jump                -> anything
//   return                       -> top of the return stack (popped)
// A violation requests re-execution: in the next cycle `reexec` is high and
// `reexec_pc` carries the address of the instruction whose successor was
// wrong, which the fetch stage must take as its next PC (discarding the
// instruction fetched in between). A wrong successor of a plain instruction
// therefore costs one extra cycle. The return stack is only updated by
// instructions whose check passed.
//
// CFIG memory: one entry per instruction word in the program region
// [BASE, BASE + 4*2^IDX_W), holding the kind (cfc_pkg::cfi_kind_e) and the
// target address. It has a synchronous read port addressed with the PC that
// will be in the fetch register in the next cycle, so its output belongs to
// pc_n when the check is made; the address of the entry read is kept and a
// check is only made when it matches pc_n (after reset or a stall the first
// instruction may go unchecked, counted in `unchecked`). Outside the region
// only sequential execution is checked. The memory is loaded through the
// write port before the program runs.
//
// Interface and timing:
//   advance   - the fetch PC register takes pc_next at this clock edge.
//   check_en  - checking enabled.
//   reexec, reexec_pc - registered re-execution request (one cycle).
//
// Following the document: checking PC_n against PC_n+1 with a CFIG held in
// on-chip memory, a return-address stack, re-fetch of the erroneous
// instruction. This design's own choices: the per-address table layout, the
// treatment of indirect transfers and empty-stack returns, and the
// one-cycle registered request.
module cfc_checker
  import cfc_pkg::*;
#(
  parameter int unsigned          AW          = 32,
  parameter int unsigned          IDX_W       = 10,
  parameter logic [31:0]          BASE        = 32'h0000_0000,
  parameter int unsigned          STACK_DEPTH = 16,
  parameter int unsigned          CNT_W       = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             check_en,
  input  logic             advance,
  input  logic [AW-1:0]    pc_n,
  input  logic [AW-1:0]    pc_next,
  output logic             reexec,
  output logic [AW-1:0]    reexec_pc,
  output logic [CNT_W-1:0] errors,
  output logic [CNT_W-1:0] checked,
  output logic [CNT_W-1:0] unchecked,
  output logic [15:0]      stack_overflows,
  // CFIG load port
  input  logic             cfig_we,
  input  logic [IDX_W-1:0] cfig_waddr,
  input  cfi_kind_e        cfig_wkind,
  input  logic [AW-1:0]    cfig_wtarget
);

  localparam int unsigned NENT = 1 << IDX_W;

  typedef struct packed {
    cfi_kind_e     kind;
    logic [AW-1:0] target;
  } cfig_entry_t;

  cfig_entry_t cfig_mem [NENT];

  initial begin
    for (int i = 0; i < NENT; i++) cfig_mem[i] = '{kind: CFI_NONE, target: '0};
  end

  // ---------------------------------------------------------------- lookup
  function automatic logic in_region(input logic [AW-1:0] pc);
    logic [AW-1:0] off;
    off = pc - AW'(BASE);
    return (pc >= AW'(BASE)) && ((off >> 2) < AW'(NENT));
  endfunction

  function automatic logic [IDX_W-1:0] index_of(input logic [AW-1:0] pc);
    logic [AW-1:0] off;
    off = pc - AW'(BASE);
    return off[IDX_W+1:2];
  endfunction

  logic [AW-1:0] look_pc;
  cfig_entry_t   rd_q;
  logic [AW-1:0] rd_pc_q;
  logic          rd_in_region_q;
  logic          rd_valid_q;

  assign look_pc = advance ? pc_next : pc_n;

  always_ff @(posedge clk) begin
    if (cfig_we) cfig_mem[cfig_waddr] <= '{kind: cfig_wkind, target: cfig_wtarget};
    rd_q <= cfig_mem[index_of(look_pc)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pc_q        <= '0;
      rd_in_region_q <= 1'b0;
      rd_valid_q     <= 1'b0;
    end else begin
      rd_pc_q        <= look_pc;
      rd_in_region_q <= in_region(look_pc);
      // a write may change the entry being read: read again
      rd_valid_q     <= !cfig_we;
    end
  end

  // ----------------------------------------------------------------- check
  cfi_kind_e     kind;
  logic [AW-1:0] seq_pc;
  logic          entry_ok, do_check, ok;
  logic          push, pop;
  logic [AW-1:0] stack_top;
  logic          stack_empty;


  assign entry_ok = rd_valid_q && (rd_pc_q == pc_n);
  assign kind     = rd_in_region_q ? rd_q.kind : CFI_NONE;
  assign seq_pc   = pc_n + AW'(4);
  // the cycle of a re-execution request carries a squashed fetch
  assign do_check = check_en && advance && entry_ok && !reexec;

  always_comb begin
    ok   = 1'b1;
    push = 1'b0;
    pop  = 1'b0;
    unique case (kind)
      CFI_NONE:     ok = (pc_next == seq_pc);
      CFI_BRANCH:   ok = (pc_next == rd_q.target) || (pc_next == seq_pc);
      CFI_JUMP:     ok = (pc_next == rd_q.target);
      CFI_CALL: begin
        ok   = (pc_next == rd_q.target);
        push = 1'b1;
      end
      CFI_CALL_IND: push = 1'b1;
      CFI_JUMP_IND: ok = 1'b1;
      CFI_RET: begin
        ok  = stack_empty || (pc_next == stack_top);
        pop = 1'b1;
      end
      default:      ok = (pc_next == seq_pc);
    endcase
    if (!do_check || !ok) begin
      push = 1'b0;
      pop  = 1'b0;
    end
  end

  cfc_return_stack #(.AW(AW), .DEPTH(STACK_DEPTH), .CNT_W(16)) u_stack (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (push),
    .push_addr(seq_pc),
    .pop      (pop),
    .top      (stack_top),
    .empty    (stack_empty),
    .overflows(stack_overflows)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reexec    <= 1'b0;
      reexec_pc <= '0;
      errors    <= '0;
      checked   <= '0;
      unchecked <= '0;
    end else begin
      reexec <= do_check && !ok;
      if (do_check && !ok) begin
        reexec_pc <= pc_n;
        errors    <= errors + 1'b1;
      end
      if (do_check) checked <= checked + 1'b1;
      if (check_en && advance && !reexec && !entry_ok) unchecked <= unchecked + 1'b1;
    end
  end

endmodule
