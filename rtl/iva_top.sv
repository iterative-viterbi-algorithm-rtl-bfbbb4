// iva_top: the two parity-concatenated coding systems, side by side, each
// with its encoder and its iterative Viterbi decoder and its own ports.
//
// System A (prefix a_) replaces the CRC of the IS-95 forward link by a
// single parity code: 176 information bits + 16 parity bits = 192 code
// bits, rate 1/2 tail-biting code with M = 8, generators 753/561 (octal),
// 384 coded bits per block, extrinsic Table (a), at most 10 iterations.
//
// System B (prefix b_) replaces an RS(255,223) outer code by a double parity
// code: 15 rows of 238 information bits plus a column parity row, each row
// given 17 parity bits (255 code bits), each row encoded by the tail-biting
// M = 6 code 744/554 (octal): 3570 information bits, 4080 code bits and
// 8160 coded bits per block, Table (b), at most 20 iterations.
//
// The encoders take information bits and give coded bit pairs; the decoders
// take 8-bit signed received samples (positive = 1) in the same order and
// give the decoded information bits, a validity flag and the iteration
// count. Nothing connects an encoder to its decoder inside: the channel is
// outside the chip.
//
// The sizes, codes, tables and iteration limits are the document's; the
// 7-bit state metrics follow its precision analysis for these two codes.
//
// Lint note: rst_n is reported as both a synchronous and an asynchronous
// signal because the decoders' handshake assertions use it in their
// "disable iff"; the logic itself only uses it as an asynchronous reset.
module iva_top
  import iva_pkg::*;
#(
  parameter int unsigned A_MAX_ITER = 10,
  parameter int unsigned B_MAX_ITER = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // System A encoder
  input  logic              a_info_valid,
  output logic              a_info_ready,
  input  logic              a_info_bit,
  output logic              a_z_valid,
  output logic [1:0]        a_z,
  output logic              a_z_last,
  // System A decoder
  input  logic              a_sel_random,
  input  logic              a_rx_valid,
  output logic              a_rx_ready,
  input  logic signed [7:0] a_rx,
  output logic              a_dec_valid,
  output logic              a_dec_bit,
  output logic              a_dec_last,
  output logic              a_done,
  output logic              a_ok,
  output logic [7:0]        a_iters,
  output logic              a_iter_pulse,
  // System B encoder
  input  logic              b_info_valid,
  output logic              b_info_ready,
  input  logic              b_info_bit,
  output logic              b_z_valid,
  output logic [1:0]        b_z,
  output logic              b_z_last,
  // System B decoder
  input  logic              b_sel_random,
  input  logic              b_rx_valid,
  output logic              b_rx_ready,
  input  logic signed [7:0] b_rx,
  output logic              b_dec_valid,
  output logic              b_dec_bit,
  output logic              b_dec_last,
  output logic              b_done,
  output logic              b_ok,
  output logic [7:0]        b_iters,
  output logic              b_iter_pulse
);

  // ---------------- System A -------------------------------------------------
  iva_encoder #(.N_B(192), .K_B(176), .ROWS(1), .M(8), .G0('o753), .G1('o561)) u_a_enc (
    .clk, .rst_n,
    .info_valid(a_info_valid), .info_ready(a_info_ready), .info_bit(a_info_bit),
    .z_valid(a_z_valid), .z(a_z), .z_last(a_z_last)
  );

  iva_decoder #(.N_B(192), .K_B(176), .ROWS(1), .M(8), .G0('o753), .G1('o561),
                .TABLE(LAMBDA_TABLE_A), .SM_W(7), .MAX_ITER(A_MAX_ITER)) u_a_dec (
    .clk, .rst_n, .sel_random(a_sel_random),
    .in_valid(a_rx_valid), .in_ready(a_rx_ready), .in_r(a_rx),
    .out_valid(a_dec_valid), .out_bit(a_dec_bit), .out_last(a_dec_last),
    .done(a_done), .dec_ok(a_ok), .iter_count(a_iters), .iter_pulse(a_iter_pulse)
  );

  // ---------------- System B -------------------------------------------------
  iva_encoder #(.N_B(255), .K_B(238), .ROWS(16), .M(6), .G0('o744), .G1('o554)) u_b_enc (
    .clk, .rst_n,
    .info_valid(b_info_valid), .info_ready(b_info_ready), .info_bit(b_info_bit),
    .z_valid(b_z_valid), .z(b_z), .z_last(b_z_last)
  );

  iva_decoder #(.N_B(255), .K_B(238), .ROWS(16), .M(6), .G0('o744), .G1('o554),
                .TABLE(LAMBDA_TABLE_B), .SM_W(7), .MAX_ITER(B_MAX_ITER)) u_b_dec (
    .clk, .rst_n, .sel_random(b_sel_random),
    .in_valid(b_rx_valid), .in_ready(b_rx_ready), .in_r(b_rx),
    .out_valid(b_dec_valid), .out_bit(b_dec_bit), .out_last(b_dec_last),
    .done(b_done), .dec_ok(b_ok), .iter_count(b_iters), .iter_pulse(b_iter_pulse)
  );

endmodule
