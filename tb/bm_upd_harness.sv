// bm_upd_harness: drives one bm_updater from random memory contents and
// checks every write against equation (5) computed here.
//
// Per pass it fills random channel metrics (omega(1) = 7 - omega(0)) and
// random hard decisions, derives the group and column parities from them,
// records the partner offsets d and dc the updater drew for every coded
// bit, checks that they are legal (1..G-1, 1..ROWS-1; both 1 when SEL_RAND
// is 0), and compares each
// written metric pair with the expected one. It also checks that every
// address is written once and that a pass takes ROWS*NC + 1 clocks.
module bm_upd_harness
  import iva_pkg::*;
#(
  parameter int unsigned   N_B      = 6,
  parameter int unsigned   K_B      = 4,
  parameter int unsigned   ROWS     = 3,
  parameter lambda_table_e TABLE    = LAMBDA_TABLE_B,
  parameter bit            SEL_RAND = 1'b0,
  parameter int            NPASS    = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_offsets      // distinct row offsets seen
);

  localparam int NC   = 2 * N_B;
  localparam int A    = 2 * (N_B - K_B);
  localparam int G    = N_B / (N_B - K_B);
  localparam int TOT  = ROWS * NC;
  localparam int AD_W = $clog2(TOT);
  localparam int PR_W = (ROWS * A > 1) ? $clog2(ROWS * A) : 1;
  localparam int PC_W = $clog2(NC);

  ch_pair_t wch  [TOT];
  bit       zh   [TOT];
  bit       prw  [ROWS*A];
  bit       pcl  [NC];
  bm_pair_t wrote [TOT];
  int       nwr  [TOT];

  logic            start = 0, busy, done, wr_en;
  logic [AD_W-1:0] rd_self, rd_rowp, rd_colp, wr_addr;
  logic [PR_W-1:0] rd_prow;
  logic [PC_W-1:0] rd_pcol;
  bm_pair_t        wr_data;

  bm_updater #(.N_B(N_B), .K_B(K_B), .ROWS(ROWS), .TABLE(TABLE)) dut (
    .clk, .rst_n, .start, .sel_random(SEL_RAND), .busy, .done,
    .rd_self, .rd_rowp, .rd_colp, .rd_prow, .rd_pcol,
    .w_self(wch[rd_self]), .w_rowp(wch[rd_rowp]), .w_colp(wch[rd_colp]),
    .z_self(zh[rd_self]), .z_rowp(zh[rd_rowp]), .z_colp(zh[rd_colp]),
    .prow(prw[rd_prow]), .pcol(pcl[rd_pcol]),
    .wr_en, .wr_addr, .wr_data);

  always @(posedge clk) begin
    if (rst_n && wr_en) begin
      wrote[wr_addr] <= wr_data;
      nwr[wr_addr]   <= nwr[wr_addr] + 1;
    end
  end

  function automatic int lam(input int w);
    if (TABLE == LAMBDA_TABLE_A) return (w >= 5) ? 1 : 0;
    return (w == 7) ? 2 : (w >= 4) ? 1 : 0;
  endfunction

  function automatic int wq(input ch_pair_t c, input int q);
    return (q != 0) ? int'(c.m1) : int'(c.m0);
  endfunction

  bit seen [int];
  int od [TOT];
  int odc [TOT];

  // offsets in use for the bit being processed
  always @(negedge clk) if (rst_n && dut.run) begin
    od[dut.rd_self]  = int'(dut.d);
    odc[dut.rd_self] = int'(dut.dc);
  end

  initial begin
    finished = 0; checks = 0; failures = 0; n_offsets = 0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int pass = 0; pass < NPASS; pass++) begin
      int cyc, d, dc;
      for (int a = 0; a < TOT; a++) begin
        int s;
        s = $urandom_range(7, 0);
        wch[a].m0 = 3'(s);
        wch[a].m1 = 3'(7 - s);
        zh[a] = bit'($urandom_range(1, 0));
        nwr[a] = 0;
      end
      foreach (prw[i]) prw[i] = 0;
      foreach (pcl[i]) pcl[i] = 0;
      for (int a = 0; a < TOT; a++) begin
        prw[(a / NC) * A + (a % NC) % A] ^= zh[a];
        pcl[a % NC] ^= zh[a];
      end
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != TOT) begin
        failures++;
        $display("pass took %0d clocks after start, expected %0d", cyc, TOT);
      end
      @(negedge clk);
      for (int a = 0; a < TOT; a++) begin
        int j, i, g, is, rp, cp, w, wc, e0, e1;
        j  = a / NC;  i = a % NC;  g = i / A;  is = i % A;
        d  = od[a];   dc = odc[a];
        checks++;
        if (d < 1 || d > G - 1 || (ROWS > 1 && (dc < 1 || dc > ROWS - 1)) ||
            (!SEL_RAND && (d != 1 || (ROWS > 1 && dc != 1)))) begin
          failures++;
          $display("addr %0d: illegal partner offsets d=%0d dc=%0d", a, d, dc);
        end
        if (!seen.exists(d)) begin seen[d] = 1; n_offsets++; end
        rp = j * NC + ((g + d) % G) * A + is;
        cp = ((j + dc) % ROWS) * NC + i;
        w  = int'(prw[j * A + is]) ^ int'(zh[a]) ^ int'(zh[rp]);
        wc = int'(pcl[i]) ^ int'(zh[a]) ^ int'(zh[cp]);
        e0 = wq(wch[a], 0) + lam(wq(wch[rp], 0 ^ w));
        e1 = wq(wch[a], 1) + lam(wq(wch[rp], 1 ^ w));
        if (ROWS > 1) begin
          e0 += lam(wq(wch[cp], 0 ^ wc));
          e1 += lam(wq(wch[cp], 1 ^ wc));
        end
        checks++;
        if (nwr[a] != 1 || int'(wrote[a].m0) != e0 || int'(wrote[a].m1) != e1) begin
          failures++;
          if (failures < 10)
            $display("addr %0d: wrote (%0d,%0d) x%0d, expected (%0d,%0d)",
                     a, wrote[a].m0, wrote[a].m1, nwr[a], e0, e1);
        end
      end
    end
    finished = 1;
  end

endmodule
