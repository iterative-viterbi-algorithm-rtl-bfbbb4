// bm_updater_tb: checks the branch metric updater against equation (5) in
// three configurations: a small double parity code (3 rows, N_B = 6,
// K_B = 4, Table (b), fixed partner offset 1), the System (a) single parity
// code (N_B = 192, K_B = 176, Table (a), random partners) and the
// System (b) double parity code (16 rows, N_B = 255, K_B = 238, Table (b),
// random partners). Random partner selection must produce more than one
// offset over the passes.
module bm_updater_tb;
  import iva_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic f0, f1, f2;
  int c0, c1, c2, e0, e1, e2, o0, o1, o2;

  bm_upd_harness #(.N_B(6), .K_B(4), .ROWS(3), .TABLE(LAMBDA_TABLE_B),
                   .SEL_RAND(1'b0), .NPASS(6)) h0 (
    .clk, .rst_n, .finished(f0), .checks(c0), .failures(e0), .n_offsets(o0));
  bm_upd_harness #(.N_B(192), .K_B(176), .ROWS(1), .TABLE(LAMBDA_TABLE_A),
                   .SEL_RAND(1'b1), .NPASS(6)) h1 (
    .clk, .rst_n, .finished(f1), .checks(c1), .failures(e1), .n_offsets(o1));
  bm_upd_harness #(.N_B(255), .K_B(238), .ROWS(16), .TABLE(LAMBDA_TABLE_B),
                   .SEL_RAND(1'b1), .NPASS(3)) h2 (
    .clk, .rst_n, .finished(f2), .checks(c2), .failures(e2), .n_offsets(o2));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (f0 && f1 && f2);
    checks = c0 + c1 + c2 + 1;
    failures = e0 + e1 + e2;
    if (o1 < 2) begin
      failures++;
      $display("random partner selection gave a single offset");
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
