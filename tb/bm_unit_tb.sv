// bm_unit_tb: checks the 3-bit quantizer and branch metrics for every
// 8-bit sample value, with the one-clock latency: s = clamp(floor(r/16)+4,
// 0, 7), omega(0) = s, omega(1) = 7 - s.
module bm_unit_tb;
  import iva_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              in_valid = 0, out_valid;
  logic signed [7:0] r = '0;
  ch_pair_t          w;

  bm_unit dut (.clk, .rst_n, .in_valid, .r, .out_valid, .w);

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int v = -128; v < 128; v++) begin
      int s;
      s = int'($floor(real'(v) / 16.0)) + 4;
      if (s < 0) s = 0;
      if (s > 7) s = 7;
      in_valid = 1; r = 8'(v);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(w.m0) != s || int'(w.m1) != 7 - s) begin
        failures++;
        $display("r=%0d: w=(%0d,%0d) expected (%0d,%0d)", v, w.m0, w.m1, s, 7 - s);
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
