// pu_subtractor: forms one element of P_U = I - U (U^T U)^-1 U^T.
//
// Each element a(row,col) of the product U (U^T U)^-1 U^T arrives from the
// multiplier together with its position. A comparator checks row == col and
// selects the minuend: one for a diagonal element, zero otherwise; the
// subtractor then outputs minuend - a. This is the structure of the
// accelerator description (equality comparator, one/zero selector,
// subtractor); the output register and the position pass-through are this
// design's own.
// Interface: new_data qualifies data, row and col.
// Timing: ready, result, row_out and col_out follow new_data by one cycle.
module pu_subtractor
  import atgp_pkg::*;
#(
  parameter int unsigned POS_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             new_data,
  input  fx_t              data,
  input  logic [POS_W-1:0] row,
  input  logic [POS_W-1:0] col,
  output logic             ready,
  output fx_t              result,
  output logic [POS_W-1:0] row_out,
  output logic [POS_W-1:0] col_out
);
  fx_t minuend;
  fx_t diff;

  always_comb begin
    minuend = (row == col) ? FX_ONE : '0;   // "one PF" / "zero PF"
    diff    = minuend - data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready   <= 1'b0;
      result  <= '0;
      row_out <= '0;
      col_out <= '0;
    end else begin
      ready <= new_data;
      if (new_data) begin
        result  <= diff;
        row_out <= row;
        col_out <= col;
      end
    end
  end
endmodule
