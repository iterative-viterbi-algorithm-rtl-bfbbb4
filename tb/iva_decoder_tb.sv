// iva_decoder_tb: self-checking testbench of iva_decoder.
//
// 1. The worked single parity example: N_B = 6, K_B = 4, memory-1 code with
//    z0 = y(t) ^ y(t-1), z1 = y(t) (generators 6 and 4, left-justified octal), channel metrics omega(0) =
//    2 5 5 0 3 4 4 3 6 1 6 7. The first VA pass must give 100101, the
//    updated metric differences omega(0)-omega(1) must be
//    -3 3 3 -7 0 2 0 0 4 -4 4 8 (partner offset 1, Table (a)), and the
//    second pass must give the valid codeword 101101 (information 1011).
// 2. Random blocks through a noisy channel for a single parity code
//    (N_B = 48, K_B = 44, 5/7 code) and a double parity code (4 rows of
//    N_B = 24, K_B = 22, Table (b)), see iva_dec_harness. A third instance
//    repeats the single parity case with the modulo (two's complement)
//    state metric method, 7-bit metrics.
module iva_decoder_tb;
  import iva_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- worked example --------------------------------------------
  logic              in_valid = 0, in_ready, out_valid, out_bit, out_last, done, dec_ok, iter_pulse;
  logic signed [7:0] in_r = '0;
  logic [7:0]        iter_count;

  iva_decoder #(.N_B(6), .K_B(4), .ROWS(1), .M(1), .G0('o6), .G1('o4),
                .TABLE(LAMBDA_TABLE_A), .SM_W(6), .MAX_ITER(10)) dut (
    .clk, .rst_n, .sel_random(1'b0),
    .in_valid, .in_ready, .in_r,
    .out_valid, .out_bit, .out_last, .done, .dec_ok, .iter_count, .iter_pulse
  );

  localparam int W0 [12] = '{2, 5, 5, 0, 3, 4, 4, 3, 6, 1, 6, 7};
  // Bit 11: W = 1 (its group 0 1 1 without itself and its partner, bit 3),
  // so omega*(0) = 7 + lambda(7) = 8 and omega*(1) = 0 + lambda(0) = 0.
  localparam int DIFF2 [12] = '{-3, 3, 3, -7, 0, 2, 0, 0, 4, -4, 4, 8};
  localparam bit Y1 [6] = '{1, 0, 0, 1, 0, 1};
  localparam bit INFO [4] = '{1, 0, 1, 1};

  bit got[$];
  always @(posedge clk) if (rst_n && out_valid) got.push_back(out_bit);

  // snapshot at the start of the second VA pass
  int n_iter_pulse = 0;
  always @(posedge clk) begin
    if (rst_n && iter_pulse && n_iter_pulse == 0) begin
      for (int t = 0; t < 6; t++) begin
        checks++;
        if (dut.yhat[t] != Y1[t]) begin
          failures++;
          $display("first pass bit %0d = %0d, expected %0d", t, dut.yhat[t], Y1[t]);
        end
      end
      for (int i = 0; i < 12; i++) begin
        int dff;
        dff = int'(dut.wmod[i].m0) - int'(dut.wmod[i].m1);
        checks++;
        if (dff != DIFF2[i]) begin
          failures++;
          $display("updated metric %0d: diff %0d, expected %0d", i, dff, DIFF2[i]);
        end
      end
    end
    if (rst_n && iter_pulse) n_iter_pulse++;
  end

  // ---------------- random blocks ---------------------------------------------
  logic fin_s, fin_d;
  int ck_s, fl_s, mu_s, mx_s, fx_s, ud_s;
  int ck_d, fl_d, mu_d, mx_d, fx_d, ud_d;
  logic fin_m;
  int ck_m, fl_m, mu_m, mx_m, fx_m, ud_m;

  iva_dec_harness #(.N_B(48), .K_B(44), .ROWS(1), .M(2), .G0('o5), .G1('o7),
                    .TABLE(LAMBDA_TABLE_A), .SM_W(6), .MAX_ITER(6),
                    .NBLK(24), .AMP(40), .U(30), .SEL_RAND(1'b1)) h_single (
    .clk, .rst_n, .finished(fin_s), .checks(ck_s), .failures(fl_s),
    .n_multi(mu_s), .n_maxed(mx_s), .n_fixed(fx_s), .n_undet(ud_s)
  );

  iva_dec_harness #(.N_B(24), .K_B(22), .ROWS(4), .M(2), .G0('o5), .G1('o7),
                    .TABLE(LAMBDA_TABLE_B), .SM_W(7), .MAX_ITER(6),
                    .NBLK(24), .AMP(40), .U(30), .SEL_RAND(1'b1)) h_double (
    .clk, .rst_n, .finished(fin_d), .checks(ck_d), .failures(fl_d),
    .n_multi(mu_d), .n_maxed(mx_d), .n_fixed(fx_d), .n_undet(ud_d)
  );

  iva_dec_harness #(.N_B(48), .K_B(44), .ROWS(1), .M(2), .G0('o5), .G1('o7),
                    .TABLE(LAMBDA_TABLE_A), .SM_W(7), .SM_MODULO(1'b1), .MAX_ITER(6),
                    .NBLK(24), .AMP(40), .U(30), .SEL_RAND(1'b1)) h_modulo (
    .clk, .rst_n, .finished(fin_m), .checks(ck_m), .failures(fl_m),
    .n_multi(mu_m), .n_maxed(mx_m), .n_fixed(fx_m), .n_undet(ud_m)
  );

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      in_valid <= 1'b1;
      in_r     <= 8'(16 * (W0[i] - 4));   // quantizes to s = omega(0)
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk iff done);
    @(negedge clk);
    checks++;
    if (!(dec_ok && iter_count == 2)) begin
      failures++;
      $display("example: ok=%0d iterations=%0d, expected 1 and 2", dec_ok, iter_count);
    end
    checks++;
    if (got.size() != 4) begin
      failures++;
      $display("example: %0d output bits", got.size());
    end
    else for (int i = 0; i < 4; i++) if (got[i] != INFO[i]) begin
      failures++;
      $display("example: info bit %0d wrong", i);
    end
    checks++;
    if (n_iter_pulse != 1) begin
      failures++;
      $display("example: %0d later passes", n_iter_pulse);
    end

    wait (fin_s && fin_d && fin_m);
    checks += ck_s + ck_d + ck_m;
    failures += fl_s + fl_d + fl_m;
    $display("single parity: %0d multi-iteration, %0d corrected, %0d at limit", mu_s, fx_s, mx_s);
    $display("double parity: %0d multi-iteration, %0d corrected, %0d at limit", mu_d, fx_d, mx_d);
    $display("modulo metrics: %0d multi-iteration, %0d corrected, %0d at limit", mu_m, fx_m, mx_m);
    checks++;
    if (fx_s == 0 || fx_d == 0 || fx_m == 0) begin
      failures++;
      $display("no block was corrected by a later iteration");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
