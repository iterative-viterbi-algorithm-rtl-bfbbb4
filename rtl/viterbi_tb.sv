// viterbi_tb: Viterbi decoder for a tail-biting, rate 1/2, feed-forward
// convolutional code of memory M (2^M states).
//
// How it works. A tail-biting block of N trellis steps has no known start or
// end state, so the trellis is treated as a circle and run "unwrapped": the
// forward pass starts with all state metrics equal at step N-L (mod N), runs
// L warm-up steps, the N steps of the block and L more steps past its end
// (T = N + 2L steps in all), with L the survivor length, five constraint
// lengths by default. Each step does add-compare-select for all states in
// one clock and stores one decision bit per state. State metrics are
// rescaled after every step by subtracting the smallest one, and held in
// SM_W bits (saturating). With SM_MODULO set, the second overflow method is
// used instead: metrics simply wrap modulo 2^SM_W and are compared through
// the sign of their SM_W-bit difference, which is exact while the spread
// stays below 2^(SM_W-1) (this needs about one bit more than rescaling). Traceback starts at the best final state and runs
// back over all T steps, one step per clock; the decisions of the middle N
// steps are the decoded bits.
//
// Interface. start begins a block. During the forward pass bm_t is the
// trellis step being processed and bm_a/bm_b must carry, combinationally,
// the branch metric pairs of its two coded bits (first, second). During
// traceback out_valid/out_t/out_bit give the decoded bits in reverse order.
// done pulses at the end. Latency: T clocks forward plus T clocks
// traceback; done is high in the 2T-th clock after the edge that samples
// start.
//
// Following the document: tail-biting VA over the unwrapped trellis, state
// metric rescaling by the smallest metric, survivor length of five
// constraint lengths, 7-bit state metrics, and both overflow methods
// (rescaling is the default). This design's choice: the
// wrap-around schedule, full-block decision memory with one traceback, ties
// resolved toward the predecessor whose dropped bit is 0, saturation.
module viterbi_tb
  import iva_pkg::*;
#(
  parameter int unsigned N     = 192,
  parameter int unsigned M     = 8,
  parameter int unsigned G0    = 'o753,
  parameter int unsigned G1    = 'o561,
  parameter int unsigned L     = 5 * (M + 1),
  parameter int unsigned SM_W  = 7,
  parameter bit          SM_MODULO = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic [$clog2(N)-1:0]   bm_t,
  input  bm_pair_t               bm_a,
  input  bm_pair_t               bm_b,
  output logic                   out_valid,
  output logic [$clog2(N)-1:0]   out_t,
  output logic                   out_bit,
  output logic                   busy,
  output logic                   done
);

  localparam int unsigned S   = 1 << M;
  localparam int unsigned T   = N + 2 * L;
  localparam int unsigned TW  = $clog2(N);
  localparam int unsigned KW  = $clog2(T + 1);
  localparam int unsigned AW  = SM_W + BM_W + 2; // ACS arithmetic width
  localparam int unsigned T0  = (N - (L % N)) % N; // first step of warm-up
  localparam logic [AW-1:0] SM_MAX = AW'((1 << SM_W) - 1);

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_TB} st_e;
  st_e st;

  logic [SM_W-1:0] sm [S];
  logic [S-1:0]    dec_mem [T];
  logic [KW-1:0]   k;
  logic [TW-1:0]   t;
  logic [M-1:0]    cur;

  // ---------------- add-compare-select, rescaling --------------------------
  logic [AW-1:0]   acs [S];
  logic [S-1:0]    dec;
  logic [AW-1:0]   acs_min;
  logic [M-1:0]    best;
  logic [SM_W-1:0] best_v;
  logic [SM_W-1:0] sm_nx [S];
  logic [M-1:0]    st_now;   // traceback: state after step k

  assign st_now = (k == KW'(T - 1)) ? best : cur;

  // Modulo comparison: a < b when (a - b) mod 2^SM_W is negative. Valid while
  // the true spread of the compared metrics is below 2^(SM_W-1).
  function automatic logic mod_less(input logic [SM_W-1:0] a, input logic [SM_W-1:0] b);
    logic [SM_W-1:0] df;
    df = a - b;
    return df[SM_W-1];
  endfunction

  function automatic logic [AW-1:0] branch(input logic [M-1:0] p, input logic u);
    logic [1:0] c;
    logic [BM_W-1:0] ma, mb;
    c  = conv_out(GEN_W'({u, p}), taps(G0, M + 1), taps(G1, M + 1));
    ma = c[0] ? bm_a.m1 : bm_a.m0;
    mb = c[1] ? bm_b.m1 : bm_b.m0;
    return AW'(ma) + AW'(mb);
  endfunction

  always_comb begin
    for (int s = 0; s < S; s++) begin
      logic [M-1:0]  p0, p1;
      logic [AW-1:0] c0, c1;
      logic          u;
      u  = s[M-1];
      p0 = M'((s << 1) | 0);
      p1 = M'((s << 1) | 1);
      c0 = AW'(sm[p0]) + branch(p0, u);
      c1 = AW'(sm[p1]) + branch(p1, u);
      dec[s] = SM_MODULO ? mod_less(c1[SM_W-1:0], c0[SM_W-1:0]) : (c1 < c0);
      acs[s] = dec[s] ? c1 : c0;
    end
    acs_min = acs[0];
    for (int s = 1; s < S; s++) begin
      if (acs[s] < acs_min) acs_min = acs[s];
    end
    for (int s = 0; s < S; s++) begin
      logic [AW-1:0] d;
      d = acs[s] - acs_min;
      if (SM_MODULO) sm_nx[s] = acs[s][SM_W-1:0];
      else           sm_nx[s] = (d > SM_MAX) ? SM_MAX[SM_W-1:0] : d[SM_W-1:0];
    end
    // best state of the current metrics: the first one holding the minimum
    // (with rescaling, the first zero)
    best   = '0;
    best_v = sm[0];
    for (int s = 1; s < S; s++) begin
      if (SM_MODULO ? mod_less(sm[s], best_v) : (sm[s] < best_v)) begin
        best   = M'(s);
        best_v = sm[s];
      end
    end
  end

  // ---------------- control -------------------------------------------------
  assign bm_t = t;
  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      k         <= '0;
      t         <= '0;
      cur       <= '0;
      out_valid <= 1'b0;
      out_t     <= '0;
      out_bit   <= 1'b0;
      done      <= 1'b0;
      for (int s = 0; s < S; s++) sm[s] <= '0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (start) begin
            st <= S_FWD;
            k  <= '0;
            t  <= TW'(T0);
            for (int s = 0; s < S; s++) sm[s] <= '0;
          end
        end
        S_FWD: begin
          for (int s = 0; s < S; s++) sm[s] <= sm_nx[s];
          dec_mem[k] <= dec;
          t <= (t == TW'(N - 1)) ? '0 : t + 1'b1;
          if (k == KW'(T - 1)) begin
            st <= S_TB;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_TB: begin
          // k walks back from T-1
          cur <= M'((st_now << 1) | M'(dec_mem[k][st_now]));
          if (k >= KW'(L) && k < KW'(L + N)) begin
            out_valid <= 1'b1;
            out_t     <= TW'(k - KW'(L));
            out_bit   <= st_now[M-1];
          end
          if (k == '0) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else begin
            k <= k - 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
