// Hardware return-address stack of the control flow checker.
//
// Calls push their return address, returns compare their target with the
// top entry and pop it. The stack is a circular buffer of DEPTH entries: a
// push onto a full stack overwrites the oldest entry (counted in
// `overflows`), so the most recent DEPTH call levels stay checkable. A pop
// on an empty stack does nothing; the checker then treats the return as
// unchecked.
//
// Interface and timing: `push` and `pop` take effect at the rising clock
// edge; `top` and `empty` are combinational from the stored state. Push and
// pop in the same cycle replace the top entry.
//
// The document names the stack and its use for calls and returns; depth
// and overflow behaviour are this design's own choices.
module cfc_return_stack #(
  parameter int unsigned AW    = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [AW-1:0]    push_addr,
  input  logic             pop,
  output logic [AW-1:0]    top,
  output logic             empty,
  output logic [CNT_W-1:0] overflows
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [AW-1:0] mem [DEPTH];
  logic [PW-1:0] sp_q;      // index of the top entry
  logic [PW:0]   count_q;   // number of valid entries, up to DEPTH

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PW-1:0] dec(input logic [PW-1:0] p);
    return (p == '0) ? PW'(DEPTH - 1) : p - 1'b1;
  endfunction

  assign empty = (count_q == '0);
  assign top   = mem[sp_q];

  // Storage: written at the top (push with pop) or above it (push).
  always_ff @(posedge clk) begin
    if (push) mem[(pop && !empty) ? sp_q : inc(sp_q)] <= push_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q      <= '0;
      count_q   <= '0;
      overflows <= '0;
    end else if (push && pop && !empty) begin
      // top entry replaced in place
    end else if (push) begin
      sp_q <= inc(sp_q);
      if (count_q == (PW+1)'(DEPTH)) begin
        if (overflows != '1) overflows <= overflows + 1'b1;
      end else begin
        count_q <= count_q + 1'b1;
      end
    end else if (pop && !empty) begin
      sp_q    <= dec(sp_q);
      count_q <= count_q - 1'b1;
    end
  end

endmodule
