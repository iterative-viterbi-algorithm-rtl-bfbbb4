// lambda_map: non-linear mapping of a 3-bit channel branch metric omega to
// the extrinsic metric lambda*omega (lambda about 0.25).
//
//   omega        0 1 2 3 4 5 6 7
//   Table (a)    0 0 0 0 0 1 1 1
//   Table (b)    0 0 0 0 1 1 1 2
//
// Both tables are the document's. Purely combinational.
module lambda_map
  import iva_pkg::*;
#(
  parameter lambda_table_e TABLE = LAMBDA_TABLE_A
) (
  input  logic [CH_W-1:0] w,
  output logic [1:0]      lw
);

  always_comb begin
    if (TABLE == LAMBDA_TABLE_A) begin
      lw = (w >= 3'd5) ? 2'd1 : 2'd0;
    end else begin
      unique case (w)
        3'd4, 3'd5, 3'd6: lw = 2'd1;
        3'd7:             lw = 2'd2;
        default:          lw = 2'd0;
      endcase
    end
  end

endmodule
