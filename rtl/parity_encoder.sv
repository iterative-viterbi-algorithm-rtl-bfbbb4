// parity_encoder: systematic encoder of the simple parity code
// g(D) = D^P + 1, P = N_B - K_B.
//
// The K_B information bits pass straight through. Bit k is also folded into
// parity class k mod P. After the K_B-th bit the encoder appends the P class
// parities, so every class of the N_B-bit codeword (bits k, k+P, k+2P, ...)
// has even parity. Example: 1011 with P = 2 gives 101101.
//
// Interface: valid/ready on both sides. While information bits flow, the
// output is combinational from the input (out_valid = in_valid,
// in_ready = out_ready); during the P parity bits in_ready is low. A block
// has no framing signal: the encoder counts K_B input bits.
//
// The code and the systematic form follow the document's example; the
// handshake is this design's choice.
module parity_encoder #(
  parameter int unsigned N_B = 192,
  parameter int unsigned K_B = 176
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);

  localparam int unsigned P   = N_B - K_B;
  localparam int unsigned PW  = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned CW  = $clog2(N_B + 1);

  logic [P-1:0]  par;
  logic [PW-1:0] cls;     // parity class of the current bit
  logic [CW-1:0] pos;     // position in the codeword
  logic          in_tail; // emitting parity bits

  assign in_tail   = (pos >= CW'(K_B));
  assign out_valid = in_tail ? 1'b1 : in_valid;
  assign out_bit   = in_tail ? par[cls] : in_bit;
  assign in_ready  = in_tail ? 1'b0 : out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par <= '0;
      cls <= '0;
      pos <= '0;
    end else if (out_valid && out_ready) begin
      if (!in_tail) par[cls] <= par[cls] ^ in_bit;
      cls <= (cls == PW'(P - 1)) ? '0 : cls + 1'b1;
      if (pos == CW'(N_B - 1)) begin
        pos <= '0;
        cls <= '0;
        par <= '0;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end

endmodule
