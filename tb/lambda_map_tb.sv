// lambda_map_tb: exhaustive check of the two extrinsic mapping tables.
module lambda_map_tb;
  import iva_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] w;
  logic [1:0] la, lb;

  lambda_map #(.TABLE(LAMBDA_TABLE_A)) dut_a (.w, .lw(la));
  lambda_map #(.TABLE(LAMBDA_TABLE_B)) dut_b (.w, .lw(lb));

  localparam int TA [8] = '{0, 0, 0, 0, 0, 1, 1, 1};
  localparam int TB [8] = '{0, 0, 0, 0, 1, 1, 1, 2};

  initial begin
    for (int i = 0; i < 8; i++) begin
      w = 3'(i);
      #1;
      checks += 2;
      if (int'(la) != TA[i]) begin failures++; $display("table a %0d -> %0d", i, la); end
      if (int'(lb) != TB[i]) begin failures++; $display("table b %0d -> %0d", i, lb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
