// iva_pkg: types, constants and helper functions shared by the iterative
// Viterbi (IVA) encoder and decoder.
//
// Branch metrics follow the convention omega(q) = -log P(r | z = q), so a
// smaller metric means a more likely bit value. A channel metric is 3 bits
// (0..7). A modified metric adds up to two extrinsic terms of at most 2 each
// (Table (b)), so it needs 4 bits (0..11).
//
// Convolutional codes are rate 1/2 and feed-forward. A generator is written
// in left-justified octal: the K = M+1 tap bits, the first tapping the
// current input, padded with zeros on the right to a whole number of octal
// digits (so 744 with K = 7 is the tap pattern 1111001, 171 right-justified). The encoder state holds the last M input bits, the most
// recent one in the MSB. The first transmitted bit of a trellis step uses
// generator G0, the second G1.
package iva_pkg;

  localparam int unsigned CH_W = 3;  // channel branch metric width
  localparam int unsigned BM_W = 4;  // modified branch metric width
  localparam int unsigned GEN_W = 16; // widest generator supported (K <= 16)

  // Metric pair of one coded bit: m0 = omega(0), m1 = omega(1).
  typedef struct packed {
    logic [CH_W-1:0] m0;
    logic [CH_W-1:0] m1;
  } ch_pair_t;

  typedef struct packed {
    logic [BM_W-1:0] m0;
    logic [BM_W-1:0] m1;
  } bm_pair_t;

  // Extrinsic mapping table: Table (a) gives 0/1, Table (b) gives 0/1/2.
  typedef enum logic {
    LAMBDA_TABLE_A = 1'b0,
    LAMBDA_TABLE_B = 1'b1
  } lambda_table_e;

  // Tap pattern, right aligned, of a left-justified octal generator.
  function automatic logic [GEN_W-1:0] taps(input int unsigned g, input int unsigned k);
    return GEN_W'(g >> ((3 - (k % 3)) % 3));
  endfunction

  // The two coded bits of a trellis step. v = {input bit, state}, K bits
  // right aligned. Bit 0 of the result is the first transmitted bit.
  function automatic logic [1:0] conv_out(input logic [GEN_W-1:0] v,
                                          input logic [GEN_W-1:0] g0,
                                          input logic [GEN_W-1:0] g1);
    return {^(v & g1), ^(v & g0)};
  endfunction

  // Channel metric pair widened to a modified metric pair.
  function automatic bm_pair_t widen(input ch_pair_t c);
    bm_pair_t b;
    b.m0 = BM_W'(c.m0);
    b.m1 = BM_W'(c.m1);
    return b;
  endfunction

endpackage
