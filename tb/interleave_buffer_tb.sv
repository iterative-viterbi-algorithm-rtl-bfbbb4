// interleave_buffer_tb: checks the interleaving buffer with its column
// parity row.
// 1. ROWS = 3, K_B = 4: rows 1011 and 1110 must come out as 1011, 1110 and
//    the parity row 0101.
// 2. ROWS = 16, K_B = 238: random blocks with random valid and ready; the
//    output must be the rows followed by their column parity, and the write
//    side must refuse data while draining.
module interleave_buffer_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_wv = 0, s_wr, s_wb = 0, s_rv, s_rr = 0, s_rb;
  interleave_buffer #(.ROWS(3), .K_B(4)) dut_s (
    .clk, .rst_n, .wr_valid(s_wv), .wr_ready(s_wr), .wr_bit(s_wb),
    .rd_valid(s_rv), .rd_ready(s_rr), .rd_bit(s_rb));

  logic b_wv = 0, b_wr, b_wb = 0, b_rv, b_rr = 0, b_rb;
  interleave_buffer dut_b (
    .clk, .rst_n, .wr_valid(b_wv), .wr_ready(b_wr), .wr_bit(b_wb),
    .rd_valid(b_rv), .rd_ready(b_rr), .rd_bit(b_rb));

  localparam string IN  = "10111110";
  localparam string OUT = "101111100101";
  int refused = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      s_wv = 1; s_wb = (IN[i] == "1");
      #1;
      checks++;
      if (!s_wr) failures++;
      @(negedge clk);
    end
    s_wv = 0;
    for (int i = 0; i < 12; i++) begin
      s_rr = 1;
      #1;
      checks++;
      if (!s_rv || s_rb != (OUT[i] == "1")) begin
        failures++;
        $display("small: output bit %0d = %0d valid %0d", i, s_rb, s_rv);
      end
      @(negedge clk);
    end
    s_rr = 0;
    #1;
    checks++;
    if (s_rv || !s_wr) failures++;

    for (int blk = 0; blk < 4; blk++) begin
      bit info[];
      bit col[238];
      int n;
      n = 0;
      info = new[15 * 238];
      foreach (info[i]) info[i] = bit'($urandom_range(1, 0));
      foreach (col[c]) col[c] = 0;
      foreach (info[i]) col[i % 238] ^= info[i];
      while (n < 15 * 238) begin
        b_wv = ($urandom_range(3, 0) != 0);
        b_wb = info[n];
        #1;
        if (b_wv && b_wr) n++;
        @(negedge clk);
      end
      b_wv = 0;
      n = 0;
      while (n < 16 * 238) begin
        b_rr = ($urandom_range(3, 0) != 0);
        b_wv = 1;
        #1;
        if (b_wr) begin
          failures++;
          $display("write side ready while draining");
        end else refused++;
        if (b_rv && b_rr) begin
          bit e;
          e = (n < 15 * 238) ? info[n] : col[n - 15 * 238];
          checks++;
          if (b_rb != e) begin
            failures++;
            if (failures < 10) $display("block %0d bit %0d wrong", blk, n);
          end
          n++;
        end
        @(negedge clk);
      end
      b_wv = 0; b_rr = 0;
    end
    checks++;
    if (refused == 0) failures++;
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
