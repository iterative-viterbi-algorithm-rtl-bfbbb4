// parity_checker: decides whether a decoded block is a valid codeword of the
// parity-concatenated code, the IVA's stopping test.
//
// The decoded bits arrive row by row, ROWS rows of N_B bits. Within a row,
// bit k belongs to row parity class k mod P (P = N_B - K_B) and every class
// must have even parity (code g(D) = D^P + 1). With ROWS > 1 every column
// (bit k of all rows) must also have even parity. After the last bit,
// done is high and ok tells whether all checks held, until clear.
//
// Interface: clear starts a new block; in_valid/in_bit, one bit per clock.
// done and ok are registered: they are valid the clock after the last bit.
//
// The checks are the document's; the streaming form is this design's choice.
module parity_checker #(
  parameter int unsigned N_B  = 192,
  parameter int unsigned K_B  = 176,
  parameter int unsigned ROWS = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  output logic done,
  output logic ok
);

  localparam int unsigned P  = N_B - K_B;
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned CW = (N_B > 1) ? $clog2(N_B) : 1;
  localparam int unsigned RW = $clog2(ROWS + 1);

  logic [P-1:0]   rsyn, rsyn_nx;
  logic [N_B-1:0] csyn, csyn_nx;
  logic [PW-1:0]  cls;
  logic [CW-1:0]  col;
  logic [RW-1:0]  row;
  logic           err;

  always_comb begin
    rsyn_nx      = rsyn;
    rsyn_nx[cls] = rsyn[cls] ^ in_bit;
    csyn_nx      = csyn;
    csyn_nx[col] = csyn[col] ^ in_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsyn <= '0;
      csyn <= '0;
      cls  <= '0;
      col  <= '0;
      row  <= '0;
      err  <= 1'b0;
      done <= 1'b0;
      ok   <= 1'b0;
    end else if (clear) begin
      rsyn <= '0;
      csyn <= '0;
      cls  <= '0;
      col  <= '0;
      row  <= '0;
      err  <= 1'b0;
      done <= 1'b0;
      ok   <= 1'b0;
    end else if (in_valid && !done) begin
      csyn <= csyn_nx;
      if (col == CW'(N_B - 1)) begin
        // end of a row: its row syndrome must be clear
        col  <= '0;
        cls  <= '0;
        rsyn <= '0;
        if (row == RW'(ROWS - 1)) begin
          done <= 1'b1;
          ok   <= !err && (rsyn_nx == '0) && ((ROWS == 1) || (csyn_nx == '0));
        end else begin
          err <= err || (rsyn_nx != '0);
        end
        row <= row + 1'b1;
      end else begin
        col  <= col + 1'b1;
        cls  <= (cls == PW'(P - 1)) ? '0 : cls + 1'b1;
        rsyn <= rsyn_nx;
      end
    end
  end

endmodule
