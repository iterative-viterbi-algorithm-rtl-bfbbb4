// viterbi_tb_tb: checks the tail-biting Viterbi decoder.
// 1. The worked example (N = 6, memory-1 code 6/4, channel metrics
//    omega(0) = 2 5 5 0 3 4 4 3 6 1 6 7, omega(1) = 7 - omega(0)) must
//    decode to 100101, the first-pass result of the example.
// 2. The M = 8 code 753/561 over N = 192 steps and the M = 6 code 744/554
//    over N = 255 steps: random rows, tail-biting encoded by the reference,
//    must decode exactly from noise-free metrics and from metrics with three
//    widely separated fully wrong coded bits.
//    Four more blocks per code carry random soft metrics (omega(0) drawn
//    around the right value, omega(1) = 7 - omega(0)).
// 3. A second decoder per code uses the modulo (two's complement) overflow
//    method with 8-bit state metrics; both overflow methods are exact, so its
//    decisions must equal those of the rescaling decoder on every block.
// done must come exactly 2*(N + 2L) clocks after the edge that samples start.
module viterbi_tb_tb;
  import iva_pkg::*;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- example DUT ---------------------------------------------
  logic          e_start = 0, e_ov, e_ob, e_busy, e_done;
  logic [2:0]    e_t, e_ot;
  bm_pair_t      e_a, e_b;
  bm_pair_t      e_mem [12];
  viterbi_tb #(.N(6), .M(1), .G0('o6), .G1('o4), .L(10), .SM_W(6)) dut_e (
    .clk, .rst_n, .start(e_start), .bm_t(e_t), .bm_a(e_a), .bm_b(e_b),
    .out_valid(e_ov), .out_t(e_ot), .out_bit(e_ob), .busy(e_busy), .done(e_done));
  assign e_a = e_mem[2 * e_t];
  assign e_b = e_mem[2 * e_t + 1];

  // ---------------- M = 8 DUT -------------------------------------------------
  logic          a_start = 0, a_ov, a_ob, a_busy, a_done;
  logic [7:0]    a_t, a_ot;
  bm_pair_t      a_a, a_b;
  bm_pair_t      a_mem [384];
  viterbi_tb dut_a (
    .clk, .rst_n, .start(a_start), .bm_t(a_t), .bm_a(a_a), .bm_b(a_b),
    .out_valid(a_ov), .out_t(a_ot), .out_bit(a_ob), .busy(a_busy), .done(a_done));
  logic am_ov, am_ob, am_busy, am_done;
  logic [7:0] am_t, am_ot;
  viterbi_tb #(.SM_W(8), .SM_MODULO(1'b1)) dut_am (
    .clk, .rst_n, .start(a_start), .bm_t(am_t), .bm_a(a_mem[2 * am_t]), .bm_b(a_mem[2 * am_t + 1]),
    .out_valid(am_ov), .out_t(am_ot), .out_bit(am_ob), .busy(am_busy), .done(am_done));
  assign a_a = a_mem[2 * a_t];
  assign a_b = a_mem[2 * a_t + 1];

  // ---------------- M = 6 DUT -------------------------------------------------
  logic          b_start = 0, b_ov, b_ob, b_busy, b_done;
  logic [7:0]    b_t, b_ot;
  bm_pair_t      b_a, b_b;
  bm_pair_t      b_mem [510];
  viterbi_tb #(.N(255), .M(6), .G0('o744), .G1('o554), .L(35), .SM_W(7)) dut_b (
    .clk, .rst_n, .start(b_start), .bm_t(b_t), .bm_a(b_a), .bm_b(b_b),
    .out_valid(b_ov), .out_t(b_ot), .out_bit(b_ob), .busy(b_busy), .done(b_done));
  logic bm_ov, bm_ob, bm_busy, bm_done;
  logic [7:0] bm_t2, bm_ot;
  viterbi_tb #(.N(255), .M(6), .G0('o744), .G1('o554), .L(35), .SM_W(8), .SM_MODULO(1'b1)) dut_bm (
    .clk, .rst_n, .start(b_start), .bm_t(bm_t2), .bm_a(b_mem[2 * bm_t2]), .bm_b(b_mem[2 * bm_t2 + 1]),
    .out_valid(bm_ov), .out_t(bm_ot), .out_bit(bm_ob), .busy(bm_busy), .done(bm_done));
  assign b_a = b_mem[2 * b_t];
  assign b_b = b_mem[2 * b_t + 1];

  bit e_got [6];
  bit a_got [192];
  bit b_got [255];
  bit am_got [192];
  bit bm_got [255];
  always @(posedge clk) begin
    if (rst_n && e_ov) e_got[e_ot] <= e_ob;
    if (rst_n && a_ov) a_got[a_ot] <= a_ob;
    if (rst_n && b_ov) b_got[b_ot] <= b_ob;
    if (rst_n && am_ov) am_got[am_ot] <= am_ob;
    if (rst_n && bm_ov) bm_got[bm_ot] <= bm_ob;
  end

  localparam int W0 [12] = '{2, 5, 5, 0, 3, 4, 4, 3, 6, 1, 6, 7};
  localparam bit Y1 [6] = '{1, 0, 0, 1, 0, 1};

  // soft metric of a coded bit zz: cost of 0 is high when zz = 1, with noise
  function automatic logic [3:0] soft_metric(input bit zz);
    int v;
    v = (zz ? 5 : 2) + $urandom_range(4, 0) - 2;
    if (v < 0) v = 0;
    if (v > 7) v = 7;
    return 4'(v);
  endfunction

  task automatic check_cycles(input int cyc, input int n, input int l);
    checks++;
    // counted from the clock edge before the one that samples start
    if (cyc != 2 * (n + 2 * l) + 1) begin
      failures++;
      $display("N=%0d: %0d clocks, expected %0d", n, cyc, 2 * (n + 2 * l) + 1);
    end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // example
    for (int i = 0; i < 12; i++) begin
      e_mem[i].m0 = 4'(W0[i]);
      e_mem[i].m1 = 4'(7 - W0[i]);
    end
    @(negedge clk) e_start = 1;
    @(negedge clk) e_start = 0;
    cyc = 1;
    while (!e_done) begin @(negedge clk); cyc++; end
    check_cycles(cyc, 6, 10);
    for (int t = 0; t < 6; t++) begin
      checks++;
      if (e_got[t] != Y1[t]) begin
        failures++;
        $display("example bit %0d = %0d, expected %0d", t, e_got[t], Y1[t]);
      end
    end
    // M = 8 and M = 6 codes
    for (int blk = 0; blk < 12; blk++) begin
      bit x[];
      bit z[];
      bit noisy;
      noisy = blk[0];
      // M = 8
      x = new[192];
      foreach (x[i]) x[i] = bit'($urandom_range(1, 0));
      conv_rows(192, 1, 8, 'o753, 'o561, x, z);
      for (int i = 0; i < 384; i++) begin
        bit zz;
        zz = z[i];
        if (noisy && (i == 30 || i == 170 || i == 330)) zz = !zz;
        a_mem[i].m0 = zz ? 4'd7 : 4'd0;
        if (blk >= 8) a_mem[i].m0 = soft_metric(zz);
        a_mem[i].m1 = 4'd7 - a_mem[i].m0;
      end
      @(negedge clk) a_start = 1;
      @(negedge clk) a_start = 0;
      cyc = 1;
      while (!a_done) begin @(negedge clk); cyc++; end
      check_cycles(cyc, 192, 45);
      @(negedge clk);
      for (int t = 0; t < 192; t++) begin
        checks++;
        if (am_got[t] != a_got[t]) begin
          failures++;
          if (failures < 10) $display("M=8 block %0d bit %0d: modulo and rescaling differ", blk, t);
        end
        if (blk >= 8) continue;
        checks++;
        if (a_got[t] != x[t]) begin
          failures++;
          if (failures < 10) $display("M=8 block %0d bit %0d wrong", blk, t);
        end
      end
      // M = 6
      x = new[255];
      foreach (x[i]) x[i] = bit'($urandom_range(1, 0));
      conv_rows(255, 1, 6, 'o744, 'o554, x, z);
      for (int i = 0; i < 510; i++) begin
        bit zz;
        zz = z[i];
        if (noisy && (i == 3 || i == 200 || i == 420)) zz = !zz;
        b_mem[i].m0 = zz ? 4'd7 : 4'd0;
        if (blk >= 8) b_mem[i].m0 = soft_metric(zz);
        b_mem[i].m1 = 4'd7 - b_mem[i].m0;
      end
      @(negedge clk) b_start = 1;
      @(negedge clk) b_start = 0;
      cyc = 1;
      while (!b_done) begin @(negedge clk); cyc++; end
      check_cycles(cyc, 255, 35);
      @(negedge clk);
      for (int t = 0; t < 255; t++) begin
        checks++;
        if (bm_got[t] != b_got[t]) begin
          failures++;
          if (failures < 10) $display("M=6 block %0d bit %0d: modulo and rescaling differ", blk, t);
        end
        if (blk >= 8) continue;
        checks++;
        if (b_got[t] != x[t]) begin
          failures++;
          if (failures < 10) $display("M=6 block %0d bit %0d wrong", blk, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
