// interleave_buffer: ROWS x K_B bit interleaving buffer of the double
// parity-check concatenated code.
//
// The write side accepts (ROWS-1)*K_B information bits row by row and stores
// them in the first ROWS-1 rows. While they arrive, the last row accumulates
// the even parity of each column, so when the buffer is full the last row
// holds the column parity row. The read side then streams all ROWS*K_B bits
// row by row (parity row last) and the buffer accepts a new block.
//
// Interface: wr_valid/wr_ready/wr_bit, rd_valid/rd_ready/rd_bit. The buffer
// is either filling or draining, never both. rd_bit is a combinational read.
//
// The buffer size and the column parity row follow the document; the single
// buffer (no ping-pong) and the handshake are this design's choice.
module interleave_buffer #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned K_B  = 238
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_valid,
  output logic wr_ready,
  input  logic wr_bit,
  output logic rd_valid,
  input  logic rd_ready,
  output logic rd_bit
);

  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CW = (K_B > 1) ? $clog2(K_B) : 1;

  logic [K_B-1:0] mem [ROWS];
  logic [RW-1:0]  row;
  logic [CW-1:0]  col;
  logic           draining;

  assign wr_ready = !draining;
  assign rd_valid = draining;
  assign rd_bit   = mem[row][col];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row      <= '0;
      col      <= '0;
      draining <= 1'b0;
      for (int r = 0; r < ROWS; r++) mem[r] <= '0;
    end else if (!draining) begin
      if (wr_valid) begin
        mem[row][col] <= wr_bit;
        // first row starts the parity row afresh
        mem[ROWS-1][col] <= (row == '0) ? wr_bit : (mem[ROWS-1][col] ^ wr_bit);
        if (col == CW'(K_B - 1)) begin
          col <= '0;
          if (row == RW'(ROWS - 2)) begin
            row      <= '0;
            draining <= 1'b1;
          end else begin
            row <= row + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end else if (rd_ready) begin
      if (col == CW'(K_B - 1)) begin
        col <= '0;
        if (row == RW'(ROWS - 1)) begin
          row      <= '0;
          draining <= 1'b0;
        end else begin
          row <= row + 1'b1;
        end
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
