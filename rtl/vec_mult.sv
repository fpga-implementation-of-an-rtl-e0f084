// vec_mult: pipelined dot product of two vectors (the "multiplier" unit).
//
// A row of N multipliers forms the element-wise products a[k]*b[k]; a binary
// tree of adders then sums them two by two, level after level, down to one
// value. Every multiplier output and every tree level is registered, so a new
// pair of vectors can be accepted every cycle and the unit performs one
// row-by-column product per cycle when a matrix product is streamed through
// it. This structure (a row of multipliers feeding an adder tree, pipelined,
// vectors of any length up to a maximum) follows the accelerator description;
// the register placement, the lane masking and the tag are this design's own.
//
// Interface: when calc is high, a, b, len and tag are taken in. Lanes k >= len
// are treated as zero, so vectors shorter than N (length t for the products
// that involve the target matrix) use the low lanes. The products are kept at
// full width through the tree; the final sum is shifted back to the word
// format and saturated once, at the output.
// Timing: ready pulses with result and tag_out $clog2(N) + 2 cycles
// after calc. busy is high while any product is still in the pipeline.
module vec_mult
  import atgp_pkg::*;
#(
  parameter int unsigned N     = 256,
  parameter int unsigned TAG_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     calc,
  input  logic [$clog2(N+1)-1:0]   len,
  input  fx_t                      a [N],
  input  fx_t                      b [N],
  input  logic [TAG_W-1:0]         tag,
  output fx_t                      result,
  output logic                     ready,
  output logic [TAG_W-1:0]         tag_out,
  output logic                     busy
);
  localparam int unsigned LV  = (N > 1) ? $clog2(N) : 1;  // adder-tree levels
  localparam int unsigned NP  = 1 << LV;                  // lanes padded to a power of two
  localparam int unsigned SW  = 2*DATA_W + LV;            // width of the tree sums

  typedef logic signed [SW-1:0] sum_t;

  // level 0 holds the products, level LV the complete sum
  sum_t             lvl [LV+1][NP];
  logic [LV:0]      vld;
  logic [TAG_W-1:0] tg  [LV+1];

  // multiplier row
  always_ff @(posedge clk) begin
    for (int k = 0; k < NP; k++) begin
      if (k < N && k < int'(len))
        lvl[0][k] <= sum_t'(a[k % N]) * sum_t'(b[k % N]);
      else
        lvl[0][k] <= '0;
    end
    tg[0] <= tag;
  end

  // adder tree
  for (genvar l = 1; l <= LV; l++) begin : g_level
    always_ff @(posedge clk) begin
      for (int k = 0; k < (NP >> l); k++)
        lvl[l][k] <= lvl[l-1][2*k] + lvl[l-1][2*k+1];
      for (int k = (NP >> l); k < NP; k++)
        lvl[l][k] <= '0;
      tg[l] <= tg[l-1];
    end
  end

  // valid shift register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LV-1:0], calc};
  end

  // output stage: back to word scale, saturate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready   <= 1'b0;
      result  <= '0;
      tag_out <= '0;
    end else begin
      ready   <= vld[LV];
      result  <= fx_sat((2*DATA_W+16)'(lvl[LV][0] >>> FRAC_W));
      tag_out <= tg[LV];
    end
  end

  assign busy = (|vld) || ready;
endmodule
