// bm_unit: branch metric unit. Quantizes a received BPSK sample to 3 bits
// and forms the two branch metrics of the coded bit.
//
// The sample r is signed, positive for a transmitted 1. It is uniformly
// quantized with step 2^Q_SHIFT and clipped: s = clamp(floor(r/2^Q_SHIFT)
// + 4, 0, 7). Then omega(0) = s and omega(1) = 7 - s, so the two metrics
// always add to 7, as in the document's worked example, and a strong 1
// gives omega(1) = 0.
//
// Interface: in_valid/r in, out_valid/w one clock later.
//
// The 3-bit metric range is the document's; the uniform quantizer, its step
// and the sample width are this design's choice.
module bm_unit
  import iva_pkg::*;
#(
  parameter int unsigned R_W     = 8,
  parameter int unsigned Q_SHIFT = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [R_W-1:0] r,
  output logic                  out_valid,
  output ch_pair_t              w
);

  logic signed [R_W:0] q;
  logic [CH_W-1:0]     s;

  always_comb begin
    q = (R_W+1)'(r >>> Q_SHIFT) + (R_W+1)'(4);
    if (q < 0)                   s = 3'd0;
    else if (q > (R_W+1)'(7))    s = 3'd7;
    else                         s = q[CH_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      w         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w.m0 <= s;
        w.m1 <= 3'd7 - s;
      end
    end
  end

endmodule
