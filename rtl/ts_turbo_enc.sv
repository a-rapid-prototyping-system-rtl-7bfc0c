// 3GPP LTE Turbo encoder (rate 1/3, block length K) of the Turbo slave.
//
// Two identical 8-state recursive systematic convolutional encoders
// (feedback 1 + D^2 + D^3, parity 1 + D + D^3) encode the K information
// bits in natural order and in the order of the quadratic permutation
// polynomial interleaver pi(i) = (F1*i + F2*i^2) mod K. The interleaver
// address is computed incrementally: pi(i+1) = pi(i) + g(i), with
// g(i) = F1 + F2*(2i+1), all mod K. After the K data bits both encoders
// are driven back to the zero state in three steps each (input equal to
// the feedback), giving the usual twelve tail bits.
//
// Operation and timing:
//   LOAD  - `in_valid` shifts `in_bit` into the K-bit frame buffer (bit 0
//           first); after K bits the encoder starts by itself.
//   ENC   - one output triple per cycle: out_sys = c(k), out_p1 = parity
//           of encoder 1, out_p2 = parity of encoder 2 on c(pi(k)),
//           k = 0..K-1 (`out_valid` high).
//   TERM  - three cycles computing the tail bits, no output.
//   TAIL  - four triples with the tail bits in the standard arrangement:
//           (x_K, z_K, x_K+1), (z_K+1, x_K+2, z_K+2),
//           (x'_K, z'_K, x'_K+1), (z'_K+1, x'_K+2, z'_K+2);
//           `out_last` marks the final one. Then back to LOAD.
// A frame takes K load cycles plus K + 7 encoding cycles.
//
// The document names the LTE Turbo code with block length 512 and rate 1/3;
// the encoder structure and the interleaver parameters for K = 512
// (F1 = 31, F2 = 64) are those of the LTE standard. There is no
// back-pressure on the output.
module ts_turbo_enc #(
  parameter int unsigned K  = 512,
  parameter int unsigned F1 = 31,
  parameter int unsigned F2 = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic busy,
  output logic out_valid,
  output logic out_sys,
  output logic out_p1,
  output logic out_p2,
  output logic out_last
);

  localparam int unsigned KW = $clog2(K) + 1;

  typedef enum logic [1:0] {S_LOAD, S_ENC, S_TERM, S_TAIL} state_e;

  state_e        state_q;
  logic [K-1:0]  frame_q;
  logic [KW-1:0] k_q;             // bit counter
  logic [KW-1:0] pi_q, g_q;       // interleaver address and increment
  logic [2:0]    s1_q, s2_q;      // encoder states {D1, D2, D3} as [0],[1],[2]
  logic [11:0]   tail_q;          // {x,z} of encoder 1 then 2, per step

  function automatic logic [KW-1:0] add_mod(input logic [KW-1:0] a, input logic [KW-1:0] b);
    logic [KW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= (KW+1)'(K)) s = s - (KW+1)'(K);
    return s[KW-1:0];
  endfunction

  // one step of an RSC encoder: returns {parity, next state}
  function automatic logic [3:0] rsc(input logic [2:0] s, input logic c);
    logic a;
    a = c ^ s[1] ^ s[2];
    return {a ^ s[0] ^ s[2], {s[1], s[0], a}};
  endfunction

  logic [3:0] r1, r2;
  logic       c1, c2, t1, t2;
  assign c1 = frame_q[k_q[KW-2:0]];
  assign c2 = frame_q[pi_q[KW-2:0]];
  assign t1 = s1_q[1] ^ s1_q[2];   // termination input: cancels the feedback
  assign t2 = s2_q[1] ^ s2_q[2];
  assign r1 = rsc(s1_q, (state_q == S_TERM) ? t1 : c1);
  assign r2 = rsc(s2_q, (state_q == S_TERM) ? t2 : c2);

  assign busy = (state_q != S_LOAD);

  always_comb begin
    out_valid = 1'b0;
    out_last  = 1'b0;
    {out_sys, out_p1, out_p2} = 3'b000;
    unique case (state_q)
      S_ENC: begin
        out_valid = 1'b1;
        {out_sys, out_p1, out_p2} = {c1, r1[3], r2[3]};
      end
      S_TAIL: begin
        out_valid = 1'b1;
        // tail_q = {x0,z0,x1,z1,x2,z2 | x'0,z'0,x'1,z'1,x'2,z'2}
        unique case (k_q[1:0])
          2'd0: {out_sys, out_p1, out_p2} = {tail_q[11], tail_q[10], tail_q[9]};
          2'd1: {out_sys, out_p1, out_p2} = {tail_q[8],  tail_q[7],  tail_q[6]};
          2'd2: {out_sys, out_p1, out_p2} = {tail_q[5],  tail_q[4],  tail_q[3]};
          default: begin
            {out_sys, out_p1, out_p2} = {tail_q[2], tail_q[1], tail_q[0]};
            out_last = 1'b1;
          end
        endcase
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_LOAD;
      frame_q <= '0;
      k_q     <= '0;
      pi_q    <= '0;
      g_q     <= '0;
      s1_q    <= '0;
      s2_q    <= '0;
      tail_q  <= '0;
    end else begin
      unique case (state_q)
        S_LOAD: if (in_valid) begin
          frame_q <= {in_bit, frame_q[K-1:1]};
          if (k_q == KW'(K - 1)) begin
            state_q <= S_ENC;
            k_q     <= '0;
            pi_q    <= '0;
            g_q     <= KW'((F1 + F2) % K);
            s1_q    <= '0;
            s2_q    <= '0;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        S_ENC: begin
          s1_q <= r1[2:0];
          s2_q <= r2[2:0];
          pi_q <= add_mod(pi_q, g_q);
          g_q  <= add_mod(g_q, KW'((2 * F2) % K));
          if (k_q == KW'(K - 1)) begin
            state_q <= S_TERM;
            k_q     <= '0;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        S_TERM: begin
          s1_q <= r1[2:0];
          s2_q <= r2[2:0];
          // step k_q: x = t, z = parity
          tail_q[11 - 2*k_q[1:0]] <= t1;
          tail_q[10 - 2*k_q[1:0]] <= r1[3];
          tail_q[5 - 2*k_q[1:0]]  <= t2;
          tail_q[4 - 2*k_q[1:0]]  <= r2[3];
          if (k_q == KW'(2)) begin
            state_q <= S_TAIL;
            k_q     <= '0;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        S_TAIL: begin
          if (k_q == KW'(3)) begin
            state_q <= S_LOAD;
            k_q     <= '0;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        default: state_q <= S_LOAD;
      endcase
    end
  end

endmodule
