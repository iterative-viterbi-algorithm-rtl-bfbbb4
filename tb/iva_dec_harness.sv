// iva_dec_harness: drives one iva_decoder with random blocks through a noisy
// BPSK channel and checks what comes back.
//
// For each of NBLK blocks it draws random information bits, encodes them
// with the behavioural reference encoder, sends the samples with amplitude
// AMP and noise half-width U, and collects the decoded bits. Checks per
// block: the right number of output bits; iter_count between 1 and
// MAX_ITER; iter_count below MAX_ITER implies dec_ok; with U = 0 the block
// decodes in one iteration; at most one block in eight is reported valid
// but differs from the information sent (an undetected error). It counts blocks that needed more than one iteration,
// blocks that stopped at MAX_ITER, and blocks corrected after iteration 1.
module iva_dec_harness
  import iva_pkg::*;
  import iva_ref_pkg::*;
#(
  parameter int unsigned   N_B      = 48,
  parameter int unsigned   K_B      = 44,
  parameter int unsigned   ROWS     = 1,
  parameter int unsigned   M        = 2,
  parameter int unsigned   G0       = 'o5,
  parameter int unsigned   G1       = 'o7,
  parameter lambda_table_e TABLE    = LAMBDA_TABLE_A,
  parameter int unsigned   SM_W     = 6,
  parameter bit            SM_MODULO = 1'b0,
  parameter int unsigned   MAX_ITER = 10,
  parameter int            NBLK     = 10,
  parameter int            AMP      = 40,
  parameter int            U        = 30,
  parameter bit            SEL_RAND = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_multi,     // blocks that needed more than one VA pass
  output int   n_maxed,     // blocks stopped by the iteration limit
  output int   n_fixed,     // blocks valid after more than one VA pass
  output int   n_undet      // blocks reported valid that differ from the input
);

  localparam int IROWS = (ROWS > 1) ? ROWS - 1 : 1;
  localparam int NINFO = IROWS * K_B;
  localparam int NCODE = ROWS * 2 * N_B;

  logic              in_valid, in_ready, out_valid, out_bit, out_last, done, dec_ok, iter_pulse;
  logic signed [7:0] in_r;
  logic [7:0]        iter_count;

  iva_decoder #(.N_B(N_B), .K_B(K_B), .ROWS(ROWS), .M(M), .G0(G0), .G1(G1),
                .TABLE(TABLE), .SM_W(SM_W), .SM_MODULO(SM_MODULO),
               .MAX_ITER(MAX_ITER)) dut (
    .clk, .rst_n, .sel_random(SEL_RAND),
    .in_valid, .in_ready, .in_r,
    .out_valid, .out_bit, .out_last, .done, .dec_ok, .iter_count, .iter_pulse
  );

  bit got[$];
  always @(posedge clk) if (rst_n && out_valid) got.push_back(out_bit);

  initial begin
    bit info[];
    bit z[];
    byte samp[];
    finished = 0; checks = 0; failures = 0; n_multi = 0; n_maxed = 0; n_fixed = 0; n_undet = 0;
    in_valid = 0; in_r = '0;
    info = new[NINFO];
    samp = new[NCODE];
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int blk = 0; blk < NBLK; blk++) begin
      int u;
      bit same;
      u = (blk == 0) ? 0 : U;
      for (int i = 0; i < NINFO; i++) info[i] = bit'($urandom_range(1, 0));
      encode(N_B, K_B, ROWS, M, G0, G1, info, z);
      for (int i = 0; i < NCODE; i++) samp[i] = channel(z[i], AMP, u);
      got.delete();
      for (int i = 0; i < NCODE; i++) begin
        in_valid <= 1'b1;
        in_r     <= samp[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      in_valid <= 1'b0;
      @(posedge clk iff done);
      @(negedge clk);
      checks++;
      if (got.size() != NINFO) begin
        failures++;
        $display("harness N_B=%0d: block %0d gave %0d bits", N_B, blk, got.size());
      end
      checks++;
      if (int'(iter_count) < 1 || int'(iter_count) > MAX_ITER) begin
        failures++;
        $display("harness N_B=%0d: block %0d used %0d iterations", N_B, blk, iter_count);
      end
      checks++;
      if (int'(iter_count) < MAX_ITER && !dec_ok) begin
        failures++;
        $display("harness N_B=%0d: block %0d stopped early but invalid", N_B, blk);
      end
      same = (got.size() == NINFO);
      for (int i = 0; i < NINFO && same; i++) if (got[i] != info[i]) same = 0;
      if (dec_ok && !same) n_undet++;
      if (u == 0) begin
        checks++;
        if (!(same && dec_ok && iter_count == 1)) begin
          failures++;
          $display("harness N_B=%0d: noise-free block failed (iter %0d ok %0d)", N_B, iter_count, dec_ok);
        end
      end
      if (iter_count > 1) n_multi++;
      if (int'(iter_count) == MAX_ITER && !dec_ok) n_maxed++;
      if (iter_count > 1 && dec_ok) n_fixed++;
    end
    // a weak parity code lets some wrong blocks pass as valid (undetected
    // errors); more than one in eight would point at a decoder fault
    checks++;
    if (n_undet * 8 > NBLK) begin
      failures++;
      $display("harness N_B=%0d: %0d undetected errors in %0d blocks", N_B, n_undet, NBLK);
    end
    finished = 1;
  end

endmodule
