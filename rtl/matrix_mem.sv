// matrix_mem: matrix memory written element by element and read a whole row
// at a time.
//
// The accelerator keeps its matrices (U, U^T, (U^T U)^-1 U^T and P_U) in
// memories that are written one element per cycle, as the elements come out
// of the multiplier or in from the bus, but are read one complete row per
// access so that a full vector can be handed to the dot-product unit in a
// single cycle. Column access is obtained by storing the transpose, as the
// accelerator does for U and U^T (two physical memories, one laid out by rows
// and one by columns). Two independent row-read ports are provided: the P_U
// memory delivers two rows per cycle, and the Gram product U^T U reads two
// rows of U^T. The element-wise organisation (one storage column per matrix
// column) follows the description; the port set is this design's own.
//
// Interface: we writes wr_data to element (wr_row, wr_col). rd_row_a and
// rd_row_b select the rows shown on row_a and row_b. Timing: writes take
// effect at the clock edge; reads are combinational (a written element is
// visible the cycle after the write). Contents are not reset.
module matrix_mem
  import atgp_pkg::*;
#(
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 32
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(ROWS)-1:0]   wr_row,
  input  logic [$clog2(COLS)-1:0]   wr_col,
  input  fx_t                       wr_data,
  input  logic [$clog2(ROWS)-1:0]   rd_row_a,
  input  logic [$clog2(ROWS)-1:0]   rd_row_b,
  output fx_t                       row_a [COLS],
  output fx_t                       row_b [COLS]
);
  // one memory per matrix column, each ROWS deep
  for (genvar c = 0; c < COLS; c++) begin : g_col
    fx_t mem [ROWS];
    always_ff @(posedge clk) begin
      if (we && wr_col == ($clog2(COLS))'(c)) mem[wr_row] <= wr_data;
    end
    assign row_a[c] = mem[rd_row_a];
    assign row_b[c] = mem[rd_row_b];
  end
endmodule
