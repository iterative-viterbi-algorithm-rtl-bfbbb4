// bm_updater: branch metric update of the iterative Viterbi algorithm
// (step 4), one coded bit per clock.
//
// How it works. A row of N_B code bits becomes NC = 2*N_B coded bits. The
// row parity code D^P + 1 makes every coded bit z_i part of a group of
// G = N_B/P bits, i, i+A, i+2A, ... (A = 2P), whose XOR is zero. With
// ROWS > 1 the column (bit i of every row) has even parity too. For bit i in
// group position g of row j the updater
//   - picks a row partner at group position (g + d) mod G and a column
//     partner in row (j + dc) mod ROWS; d in 1..G-1 and dc in 1..ROWS-1 are
//     drawn afresh for every coded bit from an LFSR, or are both 1 when
//     sel_random is low;
//   - forms W = (XOR of the group's hard decisions) ^ z_i ^ z_partner, the
//     parity the partner must have with z_i, and likewise Wc for the column;
//   - writes omega*(q) = omega_i(q) + lambda(omega_partner(q ^ W))
//                                  + lambda(omega_colpartner(q ^ Wc)).
// All omegas on the right are channel metrics, lambda is Table (a) or (b).
//
// Interface. start begins a pass over all ROWS*NC bits (addresses are
// row*NC + i). The updater drives read addresses and expects the metrics,
// hard decisions and group/column parities back combinationally in the same
// clock; it writes wr_data at wr_addr with wr_en. done pulses after the last
// write. A pass takes ROWS*NC + 1 clocks.
//
// Following the document: equations (3)-(5), random choice of the partners
// with partner != self for every bit, lambda tables. This design's choice:
// the partner is drawn as an offset within the group from a 16-bit LFSR
// (pseudo-random, slightly non-uniform); the fixed offset 1 reproduces the
// document's worked example; partners contribute their channel (not
// previously updated) metrics, as the worked example uses.
module bm_updater
  import iva_pkg::*;
#(
  parameter int unsigned   N_B   = 192,
  parameter int unsigned   K_B   = 176,
  parameter int unsigned   ROWS  = 1,
  parameter lambda_table_e TABLE = LAMBDA_TABLE_A,
  localparam int unsigned  NC    = 2 * N_B,
  localparam int unsigned  A     = 2 * (N_B - K_B),
  localparam int unsigned  AD_W  = $clog2(ROWS * NC),
  localparam int unsigned  PR_W  = (ROWS * A > 1) ? $clog2(ROWS * A) : 1,
  localparam int unsigned  PC_W  = $clog2(NC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             sel_random,
  output logic             busy,
  output logic             done,
  // reads
  output logic [AD_W-1:0]  rd_self,
  output logic [AD_W-1:0]  rd_rowp,
  output logic [AD_W-1:0]  rd_colp,
  output logic [PR_W-1:0]  rd_prow,   // row*A + (i mod A)
  output logic [PC_W-1:0]  rd_pcol,   // i
  input  ch_pair_t         w_self,
  input  ch_pair_t         w_rowp,
  input  ch_pair_t         w_colp,
  input  logic             z_self,
  input  logic             z_rowp,
  input  logic             z_colp,
  input  logic             prow,
  input  logic             pcol,
  // write
  output logic             wr_en,
  output logic [AD_W-1:0]  wr_addr,
  output bm_pair_t         wr_data
);

  localparam int unsigned G   = N_B / (N_B - K_B);
  localparam int unsigned GW  = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned IW  = (A > 1) ? $clog2(A) : 1;
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [GW-1:0] g, d, pg;
  logic [IW-1:0] is;
  logic [RW-1:0] j, dc, jc;
  logic [15:0]   lfsr;
  logic          run;

  // partner positions
  always_comb begin
    logic [GW:0] sum;
    logic [RW:0] rsum;
    sum  = {1'b0, g} + {1'b0, d};
    pg   = (sum >= (GW+1)'(G)) ? GW'(sum - (GW+1)'(G)) : sum[GW-1:0];
    rsum = {1'b0, j} + {1'b0, dc};
    jc   = (rsum >= (RW+1)'(ROWS)) ? RW'(rsum - (RW+1)'(ROWS)) : rsum[RW-1:0];
  end

  assign rd_self = AD_W'(j) * AD_W'(NC) + AD_W'(g) * AD_W'(A) + AD_W'(is);
  assign rd_rowp = AD_W'(j) * AD_W'(NC) + AD_W'(pg) * AD_W'(A) + AD_W'(is);
  assign rd_colp = AD_W'(jc) * AD_W'(NC) + AD_W'(g) * AD_W'(A) + AD_W'(is);
  assign rd_prow = PR_W'(j) * PR_W'(A) + PR_W'(is);
  assign rd_pcol = PC_W'(g) * PC_W'(A) + PC_W'(is);

  // extrinsic terms
  logic       w_r, w_c;
  logic [CH_W-1:0] xr0, xr1, xc0, xc1;
  logic [1:0] lr0, lr1, lc0, lc1;

  assign w_r = prow ^ z_self ^ z_rowp;
  assign w_c = pcol ^ z_self ^ z_colp;
  assign xr0 = w_r ? w_rowp.m1 : w_rowp.m0;  // omega_partner(0 ^ W)
  assign xr1 = w_r ? w_rowp.m0 : w_rowp.m1;  // omega_partner(1 ^ W)
  assign xc0 = w_c ? w_colp.m1 : w_colp.m0;
  assign xc1 = w_c ? w_colp.m0 : w_colp.m1;

  lambda_map #(.TABLE(TABLE)) u_lr0 (.w(xr0), .lw(lr0));
  lambda_map #(.TABLE(TABLE)) u_lr1 (.w(xr1), .lw(lr1));
  lambda_map #(.TABLE(TABLE)) u_lc0 (.w(xc0), .lw(lc0));
  lambda_map #(.TABLE(TABLE)) u_lc1 (.w(xc1), .lw(lc1));

  bm_pair_t upd;
  always_comb begin
    upd.m0 = BM_W'(w_self.m0) + BM_W'(lr0);
    upd.m1 = BM_W'(w_self.m1) + BM_W'(lr1);
    if (ROWS > 1) begin
      upd.m0 = upd.m0 + BM_W'(lc0);
      upd.m1 = upd.m1 + BM_W'(lc1);
    end
  end

  assign busy = run;

  // partner offsets for the next coded bit; the LFSR (x^16 + x^14 + x^13 +
  // x^11 + 1) advances once per coded bit
  logic [15:0]   lfsr_nx;
  logic [GW-1:0] d_nx;
  logic [RW-1:0] dc_nx;
  assign lfsr_nx = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  always_comb begin
    d_nx  = GW'(1);
    dc_nx = RW'(1);
    if (sel_random) begin
      if (G > 2)    d_nx  = GW'(1 + (32'(lfsr[7:0]) % (G - 1)));
      if (ROWS > 2) dc_nx = RW'(1 + (32'(lfsr[15:8]) % (ROWS - 1)));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      done    <= 1'b0;
      g       <= '0;
      is      <= '0;
      j       <= '0;
      d       <= GW'(1);
      dc      <= RW'(1);
      lfsr    <= 16'hACE1;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      if (!run) begin
        if (start) begin
          run  <= 1'b1;
          g    <= '0;
          is   <= '0;
          j    <= '0;
          lfsr <= lfsr_nx;
          d    <= d_nx;
          dc   <= dc_nx;
        end
      end else begin
        // a fresh pair of offsets for every coded bit
        lfsr    <= lfsr_nx;
        d       <= d_nx;
        dc      <= dc_nx;
        wr_en   <= 1'b1;
        wr_addr <= rd_self;
        wr_data <= upd;
        if (is == IW'(A - 1)) begin
          is <= '0;
          if (g == GW'(G - 1)) begin
            g <= '0;
            if (j == RW'(ROWS - 1)) begin
              run  <= 1'b0;
              done <= 1'b1;
            end else begin
              j <= j + 1'b1;
            end
          end else begin
            g <= g + 1'b1;
          end
        end else begin
          is <= is + 1'b1;
        end
      end
    end
  end

endmodule
