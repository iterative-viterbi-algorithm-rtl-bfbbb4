// parity_encoder_tb: checks the systematic D^P + 1 parity encoder.
// 1. N_B = 6, K_B = 4: 1011 -> 101101, 1110 -> 111001, 0101 -> 010100.
// 2. N_B = 192, K_B = 176: random blocks against the reference, with random
//    output back-pressure; the input must be stalled during the 16 parity
//    bits and each block must take exactly 192 output transfers.
module parity_encoder_tb;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_iv = 0, s_ir, s_ib = 0, s_ov, s_or = 1, s_ob;
  parity_encoder #(.N_B(6), .K_B(4)) dut_s (
    .clk, .rst_n, .in_valid(s_iv), .in_ready(s_ir), .in_bit(s_ib),
    .out_valid(s_ov), .out_ready(s_or), .out_bit(s_ob));

  logic b_iv = 0, b_ir, b_ib = 0, b_ov, b_or = 1, b_ob;
  parity_encoder dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_bit(b_ib),
    .out_valid(b_ov), .out_ready(b_or), .out_bit(b_ob));

  localparam string W [3] = '{"1011", "1110", "0101"};
  localparam string X [3] = '{"101101", "111001", "010100"};

  int stalls = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      int k;
      k = 0;
      for (int t = 0; t < 6; t++) begin
        s_iv = (k < 4);
        s_ib = (k < 4) ? (W[r][k] == "1") : 1'b0;
        #1;
        checks++;
        if (!s_ov || s_ob != (X[r][t] == "1")) begin
          failures++;
          $display("row %0d bit %0d: %0d valid %0d", r, t, s_ob, s_ov);
        end
        if (t >= 4) begin
          checks++;
          if (s_ir) failures++;
        end
        if (s_iv && s_ir) k++;
        @(negedge clk);
      end
      s_iv = 0;
    end
    for (int blk = 0; blk < 10; blk++) begin
      bit info[];
      bit x[];
      int k, t;
      k = 0;
      t = 0;
      info = new[176];
      foreach (info[i]) info[i] = bit'($urandom_range(1, 0));
      code_rows(192, 176, 1, info, x);
      while (t < 192) begin
        b_iv = (k < 176);
        b_ib = (k < 176) ? info[k] : 1'b0;
        b_or = ($urandom_range(3, 0) != 0);
        #1;
        if (b_iv && !b_ir) stalls++;
        if (b_ov && b_or) begin
          checks++;
          if (b_ob != x[t]) begin
            failures++;
            if (failures < 10) $display("block %0d bit %0d wrong", blk, t);
          end
          t++;
        end
        if (b_iv && b_ir) k++;
        @(negedge clk);
      end
      b_iv = 0;
      checks++;
      if (k != 176) failures++;
    end
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
