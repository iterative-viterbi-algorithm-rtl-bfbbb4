// conv_encoder_tb: checks the tail-biting convolutional encoder.
// 1. The memory-1 code (generators 6 and 4, left-justified octal) on the
//    three rows 101101, 111001, 010100: the coded rows must be
//    01 10 11 01 10 11, 01 01 01 10 00 11 and 00 11 10 11 10 00.
// 2. The M = 8, 753/561 code on random 192-bit rows against the behavioural
//    reference encoder, including the one-clock latency.
module conv_encoder_tb;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // small code
  logic       s_init = 0, s_in_valid = 0, s_in_bit = 0, s_out_valid;
  logic [0:0] s_init_state = '0;
  logic [1:0] s_z;
  conv_encoder #(.M(1), .G0('o6), .G1('o4)) dut_s (
    .clk, .rst_n, .init(s_init), .init_state(s_init_state),
    .in_valid(s_in_valid), .in_bit(s_in_bit), .out_valid(s_out_valid), .z(s_z));

  // IS-95 code
  logic       b_init = 0, b_in_valid = 0, b_in_bit = 0, b_out_valid;
  logic [7:0] b_init_state = '0;
  logic [1:0] b_z;
  conv_encoder dut_b (
    .clk, .rst_n, .init(b_init), .init_state(b_init_state),
    .in_valid(b_in_valid), .in_bit(b_in_bit), .out_valid(b_out_valid), .z(b_z));

  localparam string XROWS [3] = '{"101101", "111001", "010100"};
  localparam string ZROWS [3] = '{"011011011011", "010101100011", "001110111000"};

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      s_init = 1; s_init_state = (XROWS[r][5] == "1");
      @(negedge clk);
      s_init = 0;
      for (int t = 0; t < 6; t++) begin
        s_in_valid = 1; s_in_bit = (XROWS[r][t] == "1");
        @(negedge clk);
        checks++;
        if (!s_out_valid || s_z[0] != (ZROWS[r][2*t] == "1") || s_z[1] != (ZROWS[r][2*t+1] == "1")) begin
          failures++;
          $display("row %0d step %0d: z=%b%b valid=%0d", r, t, s_z[0], s_z[1], s_out_valid);
        end
      end
      s_in_valid = 0;
    end
    // random rows for the M = 8 code
    for (int blk = 0; blk < 20; blk++) begin
      bit x[];
      bit z[];
      x = new[192];
      foreach (x[i]) x[i] = bit'($urandom_range(1, 0));
      conv_rows(192, 1, 8, 'o753, 'o561, x, z);
      @(negedge clk);
      b_init = 1;
      for (int m = 0; m < 8; m++) b_init_state[7-m] = x[191-m];
      @(negedge clk);
      b_init = 0;
      for (int t = 0; t < 192; t++) begin
        b_in_valid = 1; b_in_bit = x[t];
        @(negedge clk);
        checks++;
        if (!b_out_valid || b_z[0] != z[2*t] || b_z[1] != z[2*t+1]) begin
          failures++;
          if (failures < 10) $display("block %0d step %0d wrong", blk, t);
        end
      end
      b_in_valid = 0;
      @(negedge clk);
      checks++;
      if (b_out_valid) failures++;
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
