// iva_encoder: encoder of the single (ROWS = 1) and double (ROWS > 1)
// parity-check concatenated codes decoded by iva_decoder.
//
// Chain: [interleave_buffer] -> parity_encoder -> row buffer -> conv_encoder.
//   - ROWS > 1: (ROWS-1)*K_B information bits fill an interleaving buffer by
//     rows; its last row becomes the even parity of each column.
//   - Each row of K_B bits gets P = N_B - K_B parity bits of g(D) = D^P + 1.
//   - Each N_B-bit row is collected in a row buffer, then encoded as its own
//     tail-biting block: the encoder register is first loaded with the last
//     M bits of the row, then the row is shifted in from its first bit.
// Information bits per block: K_B (ROWS = 1) or (ROWS-1)*K_B. Coded bits
// per block: ROWS * 2 * N_B, sent row by row, z[0] first within a pair.
//
// Interface. info_valid/info_ready/info_bit: information bits, stalled while
// a row is being convolutionally encoded. z_valid/z/z_last: one coded pair
// per clock during encoding, no back-pressure; z_last marks the last pair
// of a block. Per row: N_B clocks to collect, 1 to load the register, N_B to
// encode.
//
// The code construction follows the document. The row buffer (needed
// because the tail-biting start state is the end of the row) and the
// handshakes are this design's choice.
module iva_encoder #(
  parameter int unsigned N_B  = 192,
  parameter int unsigned K_B  = 176,
  parameter int unsigned ROWS = 1,
  parameter int unsigned M    = 8,
  parameter int unsigned G0   = 'o753,
  parameter int unsigned G1   = 'o561
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       info_valid,
  output logic       info_ready,
  input  logic       info_bit,
  output logic       z_valid,
  output logic [1:0] z,
  output logic       z_last
);

  localparam int unsigned PW = $clog2(N_B + 1);
  localparam int unsigned RW = $clog2(ROWS + 1);

  typedef enum logic [1:0] {S_COLLECT, S_INIT, S_ENC} st_e;
  st_e st;

  logic [N_B-1:0] xbuf;
  logic [PW-1:0]  pos;
  logic [RW-1:0]  row;

  // ---------------- row source -------------------------------------------------
  logic pe_in_valid, pe_in_ready, pe_in_bit;
  logic pe_out_valid, pe_out_ready, pe_out_bit;

  if (ROWS > 1) begin : g_ilv
    interleave_buffer #(.ROWS(ROWS), .K_B(K_B)) u_ilv (
      .clk, .rst_n,
      .wr_valid(info_valid),
      .wr_ready(info_ready),
      .wr_bit  (info_bit),
      .rd_valid(pe_in_valid),
      .rd_ready(pe_in_ready),
      .rd_bit  (pe_in_bit)
    );
  end else begin : g_direct
    assign pe_in_valid = info_valid;
    assign pe_in_bit   = info_bit;
    assign info_ready  = pe_in_ready;
  end

  assign pe_out_ready = (st == S_COLLECT);

  parity_encoder #(.N_B(N_B), .K_B(K_B)) u_pe (
    .clk, .rst_n,
    .in_valid (pe_in_valid),
    .in_ready (pe_in_ready),
    .in_bit   (pe_in_bit),
    .out_valid(pe_out_valid),
    .out_ready(pe_out_ready),
    .out_bit  (pe_out_bit)
  );

  // ---------------- tail-biting convolutional encoder --------------------------
  logic         ce_init, ce_in_valid, ce_in_bit, ce_out_valid, last_q;
  logic [M-1:0] ce_init_state;

  always_comb begin
    for (int m = 0; m < M; m++) ce_init_state[M-1-m] = xbuf[N_B-1-m];
  end

  assign ce_init     = (st == S_INIT);
  assign ce_in_valid = (st == S_ENC);
  assign ce_in_bit   = xbuf[pos];

  conv_encoder #(.M(M), .G0(G0), .G1(G1)) u_ce (
    .clk, .rst_n,
    .init      (ce_init),
    .init_state(ce_init_state),
    .in_valid  (ce_in_valid),
    .in_bit    (ce_in_bit),
    .out_valid (ce_out_valid),
    .z         (z)
  );

  assign z_valid = ce_out_valid;
  assign z_last  = ce_out_valid && last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_COLLECT;
      xbuf   <= '0;
      pos    <= '0;
      row    <= '0;
      last_q <= 1'b0;
    end else begin
      last_q <= 1'b0;
      unique case (st)
        S_COLLECT: begin
          if (pe_out_valid) begin
            xbuf[pos] <= pe_out_bit;
            if (pos == PW'(N_B - 1)) begin
              pos <= '0;
              st  <= S_INIT;
            end else begin
              pos <= pos + 1'b1;
            end
          end
        end
        S_INIT: st <= S_ENC;
        S_ENC: begin
          if (pos == PW'(N_B - 1)) begin
            pos <= '0;
            st  <= S_COLLECT;
            if (row == RW'(ROWS - 1)) begin
              row    <= '0;
              last_q <= 1'b1;
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            pos <= pos + 1'b1;
          end
        end
        default: st <= S_COLLECT;
      endcase
    end
  end

endmodule
