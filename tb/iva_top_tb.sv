// iva_top_tb: end-to-end test of both systems at full size, with the top's
// default parameters.
//
// For each system, random information blocks go through the RTL encoder;
// the coded bits are sent over a BPSK channel with approximately Gaussian
// noise (modelled here) and the samples go to the RTL decoder. Blocks are
// sent at three noise levels: none, moderate and heavy. Checks: the encoder
// output equals the behavioural reference; a noise-free block decodes in
// one iteration; every block stops either valid or at the iteration limit;
// a valid block equals the information sent (at most one undetected error
// per system is tolerated). Mechanisms counted, each of which must occur:
// stop after one pass, correction by a later pass, stop at the iteration
// limit, random partner selection, fixed partner selection, encoder input
// stall.
module iva_top_tb;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              a_info_valid = 0, a_info_ready, a_info_bit = 0, a_z_valid, a_z_last;
  logic [1:0]        a_z;
  logic              a_sel_random = 0, a_rx_valid = 0, a_rx_ready;
  logic signed [7:0] a_rx = '0;
  logic              a_dec_valid, a_dec_bit, a_dec_last, a_done, a_ok, a_iter_pulse;
  logic [7:0]        a_iters;
  logic              b_info_valid = 0, b_info_ready, b_info_bit = 0, b_z_valid, b_z_last;
  logic [1:0]        b_z;
  logic              b_sel_random = 0, b_rx_valid = 0, b_rx_ready;
  logic signed [7:0] b_rx = '0;
  logic              b_dec_valid, b_dec_bit, b_dec_last, b_done, b_ok, b_iter_pulse;
  logic [7:0]        b_iters;

  iva_top dut (.*);

  // ---------------- collectors and mechanism counters -----------------------
  bit a_zq[$], b_zq[$], a_dq[$], b_dq[$];
  int n_stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_z_valid) begin a_zq.push_back(a_z[0]); a_zq.push_back(a_z[1]); end
    if (b_z_valid) begin b_zq.push_back(b_z[0]); b_zq.push_back(b_z[1]); end
    if (a_dec_valid) a_dq.push_back(a_dec_bit);
    if (b_dec_valid) b_dq.push_back(b_dec_bit);
    if ((a_info_valid && !a_info_ready) || (b_info_valid && !b_info_ready)) n_stall++;
  end

  int n_one_pass = 0, n_corrected = 0, n_limit = 0, n_random = 0, n_fixed = 0;
  int a_undet = 0, b_undet = 0;

  // noise half-widths per block: none, moderate, heavy
  localparam int A_U [10] = '{0, 26, 28, 28, 29, 30, 30, 31, 32, 70};
  localparam int B_U [4] = '{0, 29, 31, 70};

  // System A: the information of all blocks is pushed back to back, so the
  // encoder has to stall its input while it encodes a row.
  localparam int NA = 10;
  bit a_inf [NA][176];

  task automatic feed_a();
    for (int blk = 0; blk < NA; blk++) begin
      for (int i = 0; i < 176; i++) a_inf[blk][i] = bit'($urandom_range(1, 0));
      for (int i = 0; i < 176; i++) begin
        a_info_valid <= 1; a_info_bit <= a_inf[blk][i];
        @(posedge clk);
        while (!a_info_ready) @(posedge clk);
      end
    end
    a_info_valid <= 0;
  endtask

  task automatic run_a(input int blk);
    bit inf[];
    bit z[];
    bit same;
    inf = new[176];
    foreach (inf[i]) inf[i] = a_inf[blk][i];
    while (a_zq.size() < 384 * (blk + 1)) @(posedge clk);
    encode(192, 176, 1, 8, 'o753, 'o561, inf, z);
    checks++;
    for (int i = 0; i < 384; i++) if (a_zq[384 * blk + i] != z[i]) begin
      failures++;
      $display("A block %0d: encoder bit %0d wrong", blk, i);
      break;
    end
    a_sel_random <= blk[0];
    a_dq.delete();
    for (int i = 0; i < 384; i++) begin
      a_rx_valid <= 1; a_rx <= channel(a_zq[384 * blk + i], 40, A_U[blk]);
      @(posedge clk);
      while (!a_rx_ready) @(posedge clk);
    end
    a_rx_valid <= 0;
    @(posedge clk iff a_done);
    @(negedge clk);
    if (blk[0]) n_random++; else n_fixed++;
    same = (a_dq.size() == 176);
    for (int i = 0; i < 176 && same; i++) if (a_dq[i] != inf[i]) same = 0;
    $display("A block %0d (noise %0d): %0d iterations, valid %0d, correct %0d",
             blk, A_U[blk], a_iters, a_ok, same);
    score(blk, A_U[blk], same, a_ok, int'(a_iters), 10, a_undet, "A");
  endtask

  task automatic run_b(input int blk);
    bit inf[];
    bit z[];
    bit same;
    inf = new[15 * 238];
    foreach (inf[i]) inf[i] = bit'($urandom_range(1, 0));
    encode(255, 238, 16, 6, 'o744, 'o554, inf, z);
    b_zq.delete();
    for (int i = 0; i < 15 * 238; i++) begin
      b_info_valid <= 1; b_info_bit <= inf[i];
      @(posedge clk);
      while (!b_info_ready) @(posedge clk);
    end
    b_info_valid <= 0;
    while (b_zq.size() < 8160) @(posedge clk);
    checks++;
    for (int i = 0; i < 8160; i++) if (b_zq[i] != z[i]) begin
      failures++;
      $display("B block %0d: encoder bit %0d wrong", blk, i);
      break;
    end
    b_sel_random <= !blk[0];
    b_dq.delete();
    for (int i = 0; i < 8160; i++) begin
      b_rx_valid <= 1; b_rx <= channel(b_zq[i], 40, B_U[blk]);
      @(posedge clk);
      while (!b_rx_ready) @(posedge clk);
    end
    b_rx_valid <= 0;
    @(posedge clk iff b_done);
    @(negedge clk);
    if (!blk[0]) n_random++; else n_fixed++;
    same = (b_dq.size() == 15 * 238);
    for (int i = 0; i < 15 * 238 && same; i++) if (b_dq[i] != inf[i]) same = 0;
    $display("B block %0d (noise %0d): %0d iterations, valid %0d, correct %0d",
             blk, B_U[blk], b_iters, b_ok, same);
    score(blk, B_U[blk], same, b_ok, int'(b_iters), 20, b_undet, "B");
  endtask

  task automatic score(input int blk, input int u, input bit same, input bit ok,
                       input int iters, input int lim, inout int undet, input string sys);
    checks++;
    if (iters < 1 || iters > lim || (!ok && iters != lim)) begin
      failures++;
      $display("%s block %0d: stopped after %0d iterations, valid %0d", sys, blk, iters, ok);
    end
    if (u == 0) begin
      checks++;
      if (!(same && ok && iters == 1)) begin
        failures++;
        $display("%s block %0d: noise-free block not decoded in one pass", sys, blk);
      end
    end
    if (ok && !same) undet++;
    if (ok && iters == 1) n_one_pass++;
    if (ok && iters > 1) n_corrected++;
    if (!ok) n_limit++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (2) @(posedge clk);
    fork
      feed_a();
      for (int blk = 0; blk < NA; blk++) run_a(blk);
      for (int blk = 0; blk < 4; blk++) run_b(blk);
    join
    checks += 8;
    if (a_undet > 1 || b_undet > 1) begin
      failures++;
      $display("undetected errors: A %0d, B %0d", a_undet, b_undet);
    end
    $display("mechanisms: one-pass %0d, corrected %0d, at limit %0d, random %0d, fixed %0d, stalls %0d",
             n_one_pass, n_corrected, n_limit, n_random, n_fixed, n_stall);
    if (n_one_pass == 0)  begin failures++; $display("no block stopped after one pass"); end
    if (n_corrected == 0) begin failures++; $display("no block was corrected by a later pass"); end
    if (n_limit == 0)     begin failures++; $display("no block reached the iteration limit"); end
    if (n_random == 0)    begin failures++; $display("random partners never used"); end
    if (n_fixed == 0)     begin failures++; $display("fixed partners never used"); end
    if (n_stall == 0)     begin failures++; $display("encoder input never stalled"); end
    if (a_dq.size() != 176 || b_dq.size() != 3570) begin failures++; $display("output sizes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
