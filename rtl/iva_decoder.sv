// iva_decoder: iterative Viterbi algorithm (IVA) decoder for single
// (ROWS = 1) and double (ROWS > 1) parity-check concatenated codes.
//
// The decoder reuses ordinary Viterbi hardware and iterates:
//   1. LOAD   received samples are quantized (bm_unit) into channel branch
//             metrics omega(0), omega(1), ROWS rows of NC = 2*N_B coded bits.
//   2. VA     each row is decoded as a tail-biting code (viterbi_tb), using
//             the current branch metrics (the channel ones at first).
//   3. RE-ENC each decoded row is re-encoded (conv_encoder, tail-biting) to
//             get the hard decisions of the coded bits. Their group parities
//             (row code, coded-bit groups of stride A = 2*(N_B-K_B)) and
//             column parities are accumulated, and the decoded bits go to
//             parity_checker.
//   4. CHECK  stop if the decoded block satisfies the parity code(s) or the
//             iteration count has reached MAX_ITER (the first VA pass counts
//             as iteration 1).
//   5. UPDATE bm_updater rewrites every branch metric as its channel metric
//             plus extrinsic terms, then go back to 2.
// At the end the information bits (first K_B bits of each of the first
// ROWS-1 rows, or of the only row) are streamed out.
//
// Interface. in_valid/in_ready/in_r: ROWS*NC signed samples, row by row, in
// transmission order. out_valid/out_bit/out_last: the decoded information
// bits. done pulses after the last one; dec_ok (decoded block satisfies the
// parity checks) and iter_count (VA passes used) are valid from then until
// the next done. sel_random selects random extrinsic partners (see
// bm_updater). iter_pulse marks the start of each VA pass after the first.
//
// Timing per iteration: ROWS*(2*(N_B + 2L) + N_B + 6) clocks for VA and
// re-encoding, plus ROWS*NC + 2 clocks for the metric update.
//
// The algorithm and the default sizes (System (a): N_B = 192, K_B = 176,
// M = 8, generators 753/561 octal, Table (a), 7-bit state metrics) follow
// the document. The sequencing, the memories written as arrays and the
// stopping test on the decoded (not re-encoded) bits are this design's.
//
// Lint note: Verilator reports rst_n as used both asynchronously (the
// flip-flop reset) and synchronously; the synchronous use is only the
// "disable iff (!rst_n)" of the handshake assertions below, not logic.
module iva_decoder
  import iva_pkg::*;
#(
  parameter int unsigned   N_B      = 192,
  parameter int unsigned   K_B      = 176,
  parameter int unsigned   ROWS     = 1,
  parameter int unsigned   M        = 8,
  parameter int unsigned   G0       = 'o753,
  parameter int unsigned   G1       = 'o561,
  parameter lambda_table_e TABLE    = LAMBDA_TABLE_A,
  parameter int unsigned   SM_W     = 7,
  parameter bit            SM_MODULO = 1'b0,
  parameter int unsigned   MAX_ITER = 10,
  parameter int unsigned   L        = 5 * (M + 1),
  parameter int unsigned   R_W      = 8,
  parameter int unsigned   Q_SHIFT  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sel_random,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [R_W-1:0] in_r,
  output logic                  out_valid,
  output logic                  out_bit,
  output logic                  out_last,
  output logic                  done,
  output logic                  dec_ok,
  output logic [7:0]            iter_count,
  output logic                  iter_pulse
);

  localparam int unsigned NC    = 2 * N_B;
  localparam int unsigned A     = 2 * (N_B - K_B);
  localparam int unsigned TOT   = ROWS * NC;
  localparam int unsigned AD_W  = $clog2(TOT);
  localparam int unsigned PR_W  = (ROWS * A > 1) ? $clog2(ROWS * A) : 1;
  localparam int unsigned PC_W  = $clog2(NC);
  localparam int unsigned TW    = $clog2(N_B);
  localparam int unsigned PW    = $clog2(N_B + 1);
  localparam int unsigned CW    = $clog2(A);
  localparam int unsigned RW    = $clog2(ROWS + 1);
  localparam int unsigned CNT_W = $clog2(TOT + 1);
  localparam int unsigned IROWS = (ROWS > 1) ? ROWS - 1 : 1;

  // ---------------- storage --------------------------------------------------
  ch_pair_t wch  [TOT];      // channel metrics
  bm_pair_t wmod [TOT];      // metrics used by the next VA pass
  logic     zhat [TOT];      // hard decisions of the coded bits
  logic     yhat [ROWS*N_B]; // decoded code bits
  logic     prow [ROWS*A];   // parity of each coded-bit group, per row
  logic     pcol [NC];       // parity of each coded-bit column

  typedef enum logic [3:0] {
    S_LOAD, S_VA_GO, S_VA_RUN, S_RE_INIT, S_RE_RUN, S_RE_WAIT,
    S_CHECK, S_UPD_GO, S_UPD_RUN, S_OUT
  } st_e;
  st_e st;

  logic [CNT_W-1:0] in_cnt, wr_cnt;
  logic [RW-1:0]    row;
  logic [PW-1:0]    pos, opos;
  logic [CW-1:0]    cls;
  logic [7:0]       iter;
  logic [TW-1:0]    ocol;
  logic [RW-1:0]    orow;

  // ---------------- branch metric unit ---------------------------------------
  logic     bmu_valid;
  ch_pair_t bmu_w;

  assign in_ready = (st == S_LOAD) && (in_cnt < CNT_W'(TOT));

  bm_unit #(.R_W(R_W), .Q_SHIFT(Q_SHIFT)) u_bmu (
    .clk, .rst_n,
    .in_valid (in_valid && in_ready),
    .r        (in_r),
    .out_valid(bmu_valid),
    .w        (bmu_w)
  );

  // ---------------- Viterbi decoder ------------------------------------------
  logic          va_start, va_busy, va_done, va_ov, va_ob;
  logic [TW-1:0] va_t, va_ot;
  bm_pair_t      va_a, va_b;
  logic [AD_W-1:0] va_addr;

  assign va_start = (st == S_VA_GO);
  assign va_addr  = AD_W'(row) * AD_W'(NC) + AD_W'(va_t) * AD_W'(2);
  assign va_a     = wmod[va_addr];
  assign va_b     = wmod[va_addr + 1'b1];

  viterbi_tb #(.N(N_B), .M(M), .G0(G0), .G1(G1), .L(L), .SM_W(SM_W),
               .SM_MODULO(SM_MODULO)) u_va (
    .clk, .rst_n,
    .start    (va_start),
    .bm_t     (va_t),
    .bm_a     (va_a),
    .bm_b     (va_b),
    .out_valid(va_ov),
    .out_t    (va_ot),
    .out_bit  (va_ob),
    .busy     (va_busy),
    .done     (va_done)
  );

  // ---------------- re-encoder and parity checker ----------------------------
  logic         enc_init, enc_in_valid, enc_in_bit, enc_ov;
  logic [M-1:0] enc_init_state;
  logic [1:0]   enc_z;
  logic         chk_clear, chk_done, chk_ok;

  always_comb begin
    for (int m = 0; m < M; m++) begin
      enc_init_state[M-1-m] = yhat[int'(row) * N_B + N_B - 1 - m];
    end
  end

  assign enc_init     = (st == S_RE_INIT);
  assign enc_in_valid = (st == S_RE_RUN);
  assign enc_in_bit   = yhat[int'(row) * N_B + int'(pos)];

  conv_encoder #(.M(M), .G0(G0), .G1(G1)) u_reenc (
    .clk, .rst_n,
    .init      (enc_init),
    .init_state(enc_init_state),
    .in_valid  (enc_in_valid),
    .in_bit    (enc_in_bit),
    .out_valid (enc_ov),
    .z         (enc_z)
  );

  parity_checker #(.N_B(N_B), .K_B(K_B), .ROWS(ROWS)) u_chk (
    .clk, .rst_n,
    .clear   (chk_clear),
    .in_valid(enc_in_valid),
    .in_bit  (enc_in_bit),
    .done    (chk_done),
    .ok      (chk_ok)
  );

  // ---------------- branch metric updater ------------------------------------
  logic            upd_start, upd_busy, upd_done, upd_we;
  logic [AD_W-1:0] upd_self, upd_rowp, upd_colp, upd_waddr;
  logic [PR_W-1:0] upd_prow;
  logic [PC_W-1:0] upd_pcol;
  bm_pair_t        upd_wdata;

  assign upd_start = (st == S_UPD_GO);

  bm_updater #(.N_B(N_B), .K_B(K_B), .ROWS(ROWS), .TABLE(TABLE)) u_upd (
    .clk, .rst_n,
    .start     (upd_start),
    .sel_random(sel_random),
    .busy      (upd_busy),
    .done      (upd_done),
    .rd_self   (upd_self),
    .rd_rowp   (upd_rowp),
    .rd_colp   (upd_colp),
    .rd_prow   (upd_prow),
    .rd_pcol   (upd_pcol),
    .w_self    (wch[upd_self]),
    .w_rowp    (wch[upd_rowp]),
    .w_colp    (wch[upd_colp]),
    .z_self    (zhat[upd_self]),
    .z_rowp    (zhat[upd_rowp]),
    .z_colp    (zhat[upd_colp]),
    .prow      (prow[upd_prow]),
    .pcol      (pcol[upd_pcol]),
    .wr_en     (upd_we),
    .wr_addr   (upd_waddr),
    .wr_data   (upd_wdata)
  );

  // ---------------- outputs --------------------------------------------------
  assign out_valid  = (st == S_OUT);
  assign out_bit    = yhat[int'(orow) * N_B + int'(ocol)];
  assign out_last   = out_valid && (ocol == TW'(K_B - 1)) && (orow == RW'(IROWS - 1));
  assign iter_pulse = va_start && (row == '0) && (iter > 8'd1);

  // start of an iteration: forget the previous hard-decision parities
  logic new_iter;
  assign new_iter  = (st == S_LOAD && bmu_valid && wr_cnt == CNT_W'(TOT - 1)) ||
                     (st == S_UPD_RUN && upd_done);
  assign chk_clear = new_iter;

  // a unit is only started when idle
  a_va_idle: assert property (@(posedge clk) disable iff (!rst_n) !(va_start && va_busy))
    else $error("Viterbi unit started while busy");
  a_upd_idle: assert property (@(posedge clk) disable iff (!rst_n) !(upd_start && upd_busy))
    else $error("updater started while busy");

  // ---------------- control and memories -------------------------------------
  always_ff @(posedge clk) begin
    if (bmu_valid && st == S_LOAD) begin
      wch[wr_cnt[AD_W-1:0]]  <= bmu_w;
      wmod[wr_cnt[AD_W-1:0]] <= widen(bmu_w);
    end else if (upd_we) begin
      wmod[upd_waddr] <= upd_wdata;
    end
    if (va_ov) yhat[int'(row) * N_B + int'(va_ot)] <= va_ob;
    if (enc_ov) begin
      zhat[int'(row) * NC + 2 * int'(opos)]     <= enc_z[0];
      zhat[int'(row) * NC + 2 * int'(opos) + 1] <= enc_z[1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_LOAD;
      in_cnt     <= '0;
      wr_cnt     <= '0;
      row        <= '0;
      pos        <= '0;
      opos       <= '0;
      cls        <= '0;
      iter       <= '0;
      ocol       <= '0;
      orow       <= '0;
      done       <= 1'b0;
      dec_ok     <= 1'b0;
      iter_count <= '0;
      for (int i = 0; i < ROWS * A; i++) prow[i] <= 1'b0;
      for (int i = 0; i < NC; i++) pcol[i] <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid && in_ready) in_cnt <= in_cnt + 1'b1;
      if (new_iter) begin
        for (int i = 0; i < ROWS * A; i++) prow[i] <= 1'b0;
        for (int i = 0; i < NC; i++) pcol[i] <= 1'b0;
      end
      if (enc_ov) begin
        prow[int'(row) * A + int'(cls)]     <= prow[int'(row) * A + int'(cls)] ^ enc_z[0];
        prow[int'(row) * A + int'(cls) + 1] <= prow[int'(row) * A + int'(cls) + 1] ^ enc_z[1];
        pcol[2 * int'(opos)]     <= pcol[2 * int'(opos)] ^ enc_z[0];
        pcol[2 * int'(opos) + 1] <= pcol[2 * int'(opos) + 1] ^ enc_z[1];
        opos <= opos + 1'b1;
        cls  <= (cls == CW'(A - 2)) ? '0 : cls + CW'(2);
      end
      unique case (st)
        S_LOAD: begin
          if (bmu_valid) begin
            if (wr_cnt == CNT_W'(TOT - 1)) begin
              wr_cnt <= '0;
              in_cnt <= '0;
              iter   <= 8'd1;
              row    <= '0;
              st     <= S_VA_GO;
            end else begin
              wr_cnt <= wr_cnt + 1'b1;
            end
          end
        end
        S_VA_GO:  st <= S_VA_RUN;
        S_VA_RUN: if (va_done) st <= S_RE_INIT;
        S_RE_INIT: begin
          pos  <= '0;
          opos <= '0;
          cls  <= '0;
          st   <= S_RE_RUN;
        end
        S_RE_RUN: begin
          if (pos == PW'(N_B - 1)) st <= S_RE_WAIT;
          else                     pos <= pos + 1'b1;
        end
        S_RE_WAIT: begin
          // the last coded pair is written this clock
          if (row == RW'(ROWS - 1)) begin
            st <= S_CHECK;
          end else begin
            row <= row + 1'b1;
            st  <= S_VA_GO;
          end
        end
        S_CHECK: begin
          if (chk_done && (chk_ok || iter >= 8'(MAX_ITER))) begin
            dec_ok     <= chk_ok;
            iter_count <= iter;
            ocol       <= '0;
            orow       <= '0;
            st         <= S_OUT;
          end else if (chk_done) begin
            st <= S_UPD_GO;
          end
        end
        S_UPD_GO: st <= S_UPD_RUN;
        S_UPD_RUN: begin
          if (upd_done) begin
            iter <= iter + 1'b1;
            row  <= '0;
            st   <= S_VA_GO;
          end
        end
        S_OUT: begin
          if (ocol == TW'(K_B - 1)) begin
            ocol <= '0;
            if (orow == RW'(IROWS - 1)) begin
              done <= 1'b1;
              st   <= S_LOAD;
            end else begin
              orow <= orow + 1'b1;
            end
          end else begin
            ocol <= ocol + 1'b1;
          end
        end
        default: st <= S_LOAD;
      endcase
    end
  end

endmodule
