// parity_checker_tb: checks the stopping test on valid and corrupted blocks.
// Single parity (1 row, N_B = 192, K_B = 176) and double parity (16 rows,
// N_B = 255, K_B = 238). Valid blocks from the reference encoder must give
// ok; a block with one flipped bit must not (it breaks a row class); a
// block with two flipped bits in one row class of two different rows must
// give ok for single-row checking of each row but fail the column check.
// done must rise exactly one clock after the last bit.
module parity_checker_tb;
  import iva_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_clr = 0, s_v = 0, s_b = 0, s_done, s_ok;
  parity_checker dut_s (.clk, .rst_n, .clear(s_clr), .in_valid(s_v), .in_bit(s_b),
                        .done(s_done), .ok(s_ok));

  logic d_clr = 0, d_v = 0, d_b = 0, d_done, d_ok;
  parity_checker #(.N_B(255), .K_B(238), .ROWS(16)) dut_d (
    .clk, .rst_n, .clear(d_clr), .in_valid(d_v), .in_bit(d_b), .done(d_done), .ok(d_ok));

  task automatic run_s(input bit x[], input bit exp_ok, input string what);
    @(negedge clk) s_clr = 1;
    @(negedge clk) s_clr = 0;
    for (int i = 0; i < x.size(); i++) begin
      s_v = 1; s_b = x[i];
      #1;
      checks++;
      if (s_done) failures++;
      @(negedge clk);
    end
    s_v = 0;
    checks++;
    if (!s_done || s_ok != exp_ok) begin
      failures++;
      $display("single %s: done=%0d ok=%0d", what, s_done, s_ok);
    end
  endtask

  task automatic run_d(input bit x[], input bit exp_ok, input string what);
    @(negedge clk) d_clr = 1;
    @(negedge clk) d_clr = 0;
    for (int i = 0; i < x.size(); i++) begin
      d_v = 1; d_b = x[i];
      @(negedge clk);
    end
    d_v = 0;
    checks++;
    if (!d_done || d_ok != exp_ok) begin
      failures++;
      $display("double %s: done=%0d ok=%0d", what, d_done, d_ok);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int blk = 0; blk < 6; blk++) begin
      bit info[];
      bit x[];
      int p;
      info = new[176];
      foreach (info[i]) info[i] = bit'($urandom_range(1, 0));
      code_rows(192, 176, 1, info, x);
      run_s(x, 1'b1, "valid");
      p = $urandom_range(191, 0);
      x[p] ^= 1'b1;
      run_s(x, 1'b0, "one error");
      x[p] ^= 1'b1;
      x[p % 16] ^= 1'b1;
      x[(p % 16) + 16] ^= 1'b1;
      run_s(x, 1'b1, "two errors in one class");
    end
    for (int blk = 0; blk < 3; blk++) begin
      bit info[];
      bit x[];
      int c;
      info = new[15 * 238];
      foreach (info[i]) info[i] = bit'($urandom_range(1, 0));
      code_rows(255, 238, 16, info, x);
      run_d(x, 1'b1, "valid");
      c = $urandom_range(16, 0);
      // two flips in one row class of row 3: row check passes, columns fail
      x[3 * 255 + c] ^= 1'b1;
      x[3 * 255 + c + 17] ^= 1'b1;
      run_d(x, 1'b0, "column error");
      x[3 * 255 + c] ^= 1'b1;
      x[3 * 255 + c + 17] ^= 1'b1;
      // same bit of two rows: columns pass, rows fail
      x[1 * 255 + c] ^= 1'b1;
      x[9 * 255 + c] ^= 1'b1;
      run_d(x, 1'b0, "row error");
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
