// iva_encoder_tb: checks the parity-concatenated encoder.
// 1. The double parity example: 3 rows, N_B = 6, K_B = 4, memory-1 code
//    6/4. Information 1011 1110 must give the coded rows
//    01 10 11 01 10 11 / 01 01 01 10 00 11 / 00 11 10 11 10 00.
// 2. The System (a) encoder (default parameters) on random blocks and the
//    System (b) encoder (16 rows, N_B = 255, K_B = 238, M = 6, 744/554) on
//    one random block, against the behavioural reference; the input must be
//    stalled while rows are encoded and z_last must mark the last pair.
module iva_encoder_tb;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       s_iv = 0, s_ir, s_ib = 0, s_zv, s_zl;
  logic [1:0] s_z;
  iva_encoder #(.N_B(6), .K_B(4), .ROWS(3), .M(1), .G0('o6), .G1('o4)) dut_s (
    .clk, .rst_n, .info_valid(s_iv), .info_ready(s_ir), .info_bit(s_ib),
    .z_valid(s_zv), .z(s_z), .z_last(s_zl));

  logic       a_iv = 0, a_ir, a_ib = 0, a_zv, a_zl;
  logic [1:0] a_z;
  iva_encoder dut_a (
    .clk, .rst_n, .info_valid(a_iv), .info_ready(a_ir), .info_bit(a_ib),
    .z_valid(a_zv), .z(a_z), .z_last(a_zl));

  logic       b_iv = 0, b_ir, b_ib = 0, b_zv, b_zl;
  logic [1:0] b_z;
  iva_encoder #(.N_B(255), .K_B(238), .ROWS(16), .M(6), .G0('o744), .G1('o554)) dut_b (
    .clk, .rst_n, .info_valid(b_iv), .info_ready(b_ir), .info_bit(b_ib),
    .z_valid(b_zv), .z(b_z), .z_last(b_zl));

  bit s_got[$], a_got[$], b_got[$];
  int s_last[$], a_last[$], b_last[$];
  int stalls = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_zv) begin s_got.push_back(s_z[0]); s_got.push_back(s_z[1]); if (s_zl) s_last.push_back(s_got.size()); end
    if (a_zv) begin a_got.push_back(a_z[0]); a_got.push_back(a_z[1]); if (a_zl) a_last.push_back(a_got.size()); end
    if (b_zv) begin b_got.push_back(b_z[0]); b_got.push_back(b_z[1]); if (b_zl) b_last.push_back(b_got.size()); end
    if ((a_iv && !a_ir) || (b_iv && !b_ir)) stalls++;
  end

  localparam string IN = "10111110";
  localparam string ZS = "011011011011010101100011001110111000";

  task automatic compare(input bit got[$], input bit exp[], input string what);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("%s: %0d coded bits, expected %0d", what, got.size(), exp.size());
    end else begin
      // one check per coded bit
      checks += exp.size() - 1;
      for (int i = 0; i < exp.size(); i++) if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("%s: coded bit %0d wrong", what, i);
      end
    end
  endtask

  initial begin
    bit exp[];
    bit info[];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // example
    for (int i = 0; i < 8; i++) begin
      s_iv = 1; s_ib = (IN[i] == "1");
      @(posedge clk);
      while (!s_ir) @(posedge clk);
      @(negedge clk);
    end
    s_iv = 0;
    repeat (60) @(negedge clk);
    exp = new[36];
    foreach (exp[i]) exp[i] = (ZS[i] == "1");
    compare(s_got, exp, "example");
    checks++;
    if (s_last.size() != 1 || s_last[0] != 36) failures++;
    // System (a): 4 blocks back to back, System (b): one block, in parallel
    fork
      begin
        bit all[$];
        for (int blk = 0; blk < 4; blk++) begin
          bit inf[];
          bit z[];
          inf = new[176];
          foreach (inf[i]) inf[i] = bit'($urandom_range(1, 0));
          encode(192, 176, 1, 8, 'o753, 'o561, inf, z);
          foreach (z[i]) all.push_back(z[i]);
          for (int i = 0; i < 176; i++) begin
            a_iv = 1; a_ib = inf[i];
            @(posedge clk);
            while (!a_ir) @(posedge clk);
            @(negedge clk);
          end
          a_iv = 0;
        end
        repeat (400) @(negedge clk);
        exp = new[all.size()];
        foreach (exp[i]) exp[i] = all[i];
        compare(a_got, exp, "System (a)");
        checks++;
        if (a_last.size() != 4 || a_last[3] != 4 * 384) failures++;
      end
      begin
        bit inf[];
        bit z[];
        inf = new[15 * 238];
        foreach (inf[i]) inf[i] = bit'($urandom_range(1, 0));
        encode(255, 238, 16, 6, 'o744, 'o554, inf, z);
        for (int i = 0; i < 15 * 238; i++) begin
          b_iv = 1; b_ib = inf[i];
          @(posedge clk);
          while (!b_ir) @(posedge clk);
          @(negedge clk);
        end
        b_iv = 0;
        repeat (16 * 520) @(negedge clk);
        compare(b_got, z, "System (b)");
        checks++;
        if (b_last.size() != 1 || b_last[0] != 8160) failures++;
      end
    join
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("input never stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
