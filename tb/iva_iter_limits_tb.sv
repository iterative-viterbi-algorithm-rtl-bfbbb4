// iva_iter_limits_tb: the two evaluated systems at each of their iteration
// limits, decoding the same noisy blocks side by side.
//
// System A (N_B = 192, K_B = 176, M = 8, 753/561, Table (a)) is decoded by
// three decoders with limits 2, 5 and 10; System B (16 x 255/238, M = 6,
// 744/554, Table (b)) by three decoders with limits 5, 10 and 20. All
// decoders of a system get the same samples, and the decoders are reset
// before every block, so their random partner generators run in lockstep.
// A decoder with a lower limit must therefore repeat exactly the first
// passes of one with a higher limit. Checks per block and pair of limits
// lo < hi:
//   - iterations(lo) = min(iterations(hi), lo);
//   - if the higher-limit decoder stopped within lo passes, both give the
//     same decoded bits and the same validity;
//   - a block that is valid is the block that was sent (the parity code
//     misses some errors; up to two such blocks at the highest limits are
//     tolerated).
// The testbench prints, per limit, the number of valid blocks and the
// average number of passes. These are the quantities of the published
// error-rate and iteration-count curves, here over a handful of blocks at
// one noise level.
module iva_iter_limits_tb;
  import iva_pkg::*;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 12, NB = 4;
  localparam int A_LIM [3] = '{2, 5, 10};
  localparam int B_LIM [3] = '{5, 10, 20};

  // ---------------- System A decoders ---------------------------------------
  logic              a_iv = 0;
  logic signed [7:0] a_r = '0;
  logic [2:0]        a_ir, a_ov, a_ob, a_ol, a_done, a_ok, a_ip;
  logic [7:0]        a_it [3];

  // ---------------- System B decoders ---------------------------------------
  logic              b_iv = 0;
  logic signed [7:0] b_r = '0;
  logic [2:0]        b_ir, b_ov, b_ob, b_ol, b_done, b_ok, b_ip;
  logic [7:0]        b_it [3];

  for (genvar k = 0; k < 3; k++) begin : g_dec
    iva_decoder #(.MAX_ITER(A_LIM[k])) u_a (
      .clk, .rst_n, .sel_random(1'b1), .in_valid(a_iv), .in_ready(a_ir[k]), .in_r(a_r),
      .out_valid(a_ov[k]), .out_bit(a_ob[k]), .out_last(a_ol[k]), .done(a_done[k]),
      .dec_ok(a_ok[k]), .iter_count(a_it[k]), .iter_pulse(a_ip[k]));
    iva_decoder #(.N_B(255), .K_B(238), .ROWS(16), .M(6), .G0('o744), .G1('o554),
                  .TABLE(LAMBDA_TABLE_B), .SM_W(7), .MAX_ITER(B_LIM[k])) u_b (
      .clk, .rst_n, .sel_random(1'b1), .in_valid(b_iv), .in_ready(b_ir[k]), .in_r(b_r),
      .out_valid(b_ov[k]), .out_bit(b_ob[k]), .out_last(b_ol[k]), .done(b_done[k]),
      .dec_ok(b_ok[k]), .iter_count(b_it[k]), .iter_pulse(b_ip[k]));
  end

  bit a_dq [3][$];
  bit b_dq [3][$];
  bit a_fin [3], b_fin [3];
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (a_ov[k]) a_dq[k].push_back(a_ob[k]);
      if (b_ov[k]) b_dq[k].push_back(b_ob[k]);
      if (a_done[k]) a_fin[k] <= 1;
      if (b_done[k]) b_fin[k] <= 1;
    end
  end

  int a_valid [3] = '{0, 0, 0};
  int b_valid [3] = '{0, 0, 0};
  int a_pass [3] = '{0, 0, 0};
  int b_pass [3] = '{0, 0, 0};
  int undet = 0;

  task automatic reset_all();
    @(negedge clk) rst_n = 0;
    for (int k = 0; k < 3; k++) begin
      a_dq[k].delete(); b_dq[k].delete();
      a_fin[k] = 0; b_fin[k] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  // compare limit pair lo < hi of one system
  task automatic compare(input string sys, input int blk, input int lo_lim,
                         input int it_lo, input int it_hi, input bit ok_lo, input bit ok_hi,
                         input bit d_lo[$], input bit d_hi[$]);
    int exp_it;
    exp_it = (it_hi < lo_lim) ? it_hi : lo_lim;
    checks++;
    if (it_lo != exp_it) begin
      failures++;
      $display("%s block %0d: limit %0d took %0d passes, expected %0d", sys, blk, lo_lim, it_lo, exp_it);
    end
    if (it_hi <= lo_lim) begin
      checks++;
      if (ok_lo != ok_hi || d_lo != d_hi) begin
        failures++;
        $display("%s block %0d: limit %0d differs from a higher limit", sys, blk, lo_lim);
      end
    end
  endtask

  initial begin
    reset_all();
    // ---------------- System A --------------------------------------------
    for (int blk = 0; blk < NA; blk++) begin
      bit inf[];
      bit z[];
      inf = new[176];
      foreach (inf[i]) inf[i] = bit'($urandom_range(1, 0));
      encode(192, 176, 1, 8, 'o753, 'o561, inf, z);
      reset_all();
      for (int i = 0; i < 384; i++) begin
        a_iv <= 1; a_r <= channel(z[i], 40, 30);
        @(posedge clk);
        while (!a_ir[0]) @(posedge clk);
      end
      a_iv <= 0;
      wait (a_fin[0] && a_fin[1] && a_fin[2]);
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        bit same;
        same = (a_dq[k].size() == 176);
        for (int i = 0; i < 176 && same; i++) if (a_dq[k][i] != inf[i]) same = 0;
        if (a_ok[k]) a_valid[k]++;
        if (k == 2 && a_ok[k] && !same) undet++;
        a_pass[k] += int'(a_it[k]);
      end
      $display("A block %0d: passes %0d/%0d/%0d, valid %0d/%0d/%0d", blk,
               a_it[0], a_it[1], a_it[2], a_ok[0], a_ok[1], a_ok[2]);
      compare("A", blk, A_LIM[0], int'(a_it[0]), int'(a_it[2]), a_ok[0], a_ok[2], a_dq[0], a_dq[2]);
      compare("A", blk, A_LIM[1], int'(a_it[1]), int'(a_it[2]), a_ok[1], a_ok[2], a_dq[1], a_dq[2]);
    end
    // ---------------- System B --------------------------------------------
    for (int blk = 0; blk < NB; blk++) begin
      bit inf[];
      bit z[];
      inf = new[15 * 238];
      foreach (inf[i]) inf[i] = bit'($urandom_range(1, 0));
      encode(255, 238, 16, 6, 'o744, 'o554, inf, z);
      reset_all();
      for (int i = 0; i < 8160; i++) begin
        b_iv <= 1; b_r <= channel(z[i], 40, 29);
        @(posedge clk);
        while (!b_ir[0]) @(posedge clk);
      end
      b_iv <= 0;
      wait (b_fin[0] && b_fin[1] && b_fin[2]);
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        bit same;
        same = (b_dq[k].size() == 15 * 238);
        for (int i = 0; i < 15 * 238 && same; i++) if (b_dq[k][i] != inf[i]) same = 0;
        if (b_ok[k]) b_valid[k]++;
        if (k == 2 && b_ok[k] && !same) undet++;
        b_pass[k] += int'(b_it[k]);
      end
      $display("B block %0d: passes %0d/%0d/%0d, valid %0d/%0d/%0d", blk,
               b_it[0], b_it[1], b_it[2], b_ok[0], b_ok[1], b_ok[2]);
      compare("B", blk, B_LIM[0], int'(b_it[0]), int'(b_it[2]), b_ok[0], b_ok[2], b_dq[0], b_dq[2]);
      compare("B", blk, B_LIM[1], int'(b_it[1]), int'(b_it[2]), b_ok[1], b_ok[2], b_dq[1], b_dq[2]);
    end
    for (int k = 0; k < 3; k++)
      $display("System A, limit %0d: %0d of %0d blocks valid, %0d.%02d passes on average",
               A_LIM[k], a_valid[k], NA, a_pass[k] / NA, (100 * a_pass[k] / NA) % 100);
    for (int k = 0; k < 3; k++)
      $display("System B, limit %0d: %0d of %0d blocks valid, %0d.%02d passes on average",
               B_LIM[k], b_valid[k], NB, b_pass[k] / NB, (100 * b_pass[k] / NB) % 100);
    checks++;
    if (undet > 2) begin
      failures++;
      $display("%0d undetected errors", undet);
    end
    // the runs must include blocks that needed more than one pass
    checks++;
    if (a_pass[2] == NA || b_pass[2] == NB) begin
      failures++;
      $display("no block needed a second pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
