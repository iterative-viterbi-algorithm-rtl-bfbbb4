// conv_encoder: rate 1/2 feed-forward convolutional encoder with a
// tail-biting start state.
//
// A tail-biting block starts in the state it will end in: before the first
// bit of a block the shift register is loaded with the last M bits of that
// block (init / init_state), so the trellis path is a closed circle and no
// tail bits are sent. Each accepted input bit produces two coded bits one
// clock later: z[0] from generator G0 (sent first) and z[1] from G1.
//
// Interface: init loads init_state = {y[N-1], y[N-2], ..., y[N-M]} (most
// recent bit in the MSB). in_valid/in_bit feed one bit per clock; out_valid
// and z follow one clock later. No back-pressure.
//
// Following the document: tail-biting by preloading the last M bits, rate
// 1/2, the generators of the systems it evaluates (default 753/561 octal,
// M = 8, the IS-95 code). Generators are given in the document's left-justified
// octal form; the output order is this design's choice.
module conv_encoder
  import iva_pkg::*;
#(
  parameter int unsigned M  = 8,
  parameter int unsigned G0 = 'o753,
  parameter int unsigned G1 = 'o561
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic [M-1:0] init_state,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic [1:0]   z
);

  logic [M-1:0] state;
  logic [GEN_W-1:0] v;

  assign v = GEN_W'({in_bit, state});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      z         <= '0;
    end else begin
      out_valid <= in_valid;
      if (init) begin
        state <= init_state;
      end else if (in_valid) begin
        state <= M'({in_bit, state} >> 1);
        z     <= conv_out(v, taps(G0, M + 1), taps(G1, M + 1));
      end
    end
  end

endmodule
