// gj_datapath: row-operation data path of the Gauss-Jordan inverse.
//
// At the start of each elimination step the pivot row (the "first row" of the
// step) is stored in a register together with its pivot element a_ii. Then,
// for every other row j presented, the divider forms the ratio a_ji / a_ii, a
// row of multipliers multiplies the stored pivot row by it and a row of
// subtractors removes the result from row j, giving the new row j. Two copies
// are used: one works on A and produces the ratio, the other works on A^-1 and
// takes the ratio from the first (use_ext), so both matrices receive the same
// row operation in the same cycle. For the final normalisation (scale) the
// data path multiplies the presented row by a factor instead: the reciprocal
// 1/a_ii, formed by the first copy's divider and passed to the second. This
// follows the accelerator description of the data path (pivot-row register,
// divider, multipliers, subtractors) and of the two cooperating data paths;
// the scale mode, the operand tag and the output register are this design's
// own.
//
// Interface: load captures pivot_in and a_ii_in. calc presents row_in (with
// a_ji, and ext_factor when use_ext) and tag_in. ratio and recip are
// combinational outputs from the stored a_ii. Timing: new_row, tag_out and
// ready follow calc by one cycle. a_ii must be non-zero when calc is used.
module gj_datapath
  import atgp_pkg::*;
#(
  parameter int unsigned T_MAX = 32,
  parameter int unsigned TAG_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  fx_t              pivot_in [T_MAX],
  input  fx_t              a_ii_in,
  input  logic             calc,
  input  logic             scale,
  input  logic             use_ext,
  input  fx_t              ext_factor,
  input  fx_t              a_ji,
  input  fx_t              row_in [T_MAX],
  input  logic [TAG_W-1:0] tag_in,
  output fx_t              ratio,
  output fx_t              recip,
  output fx_t              new_row [T_MAX],
  output logic [TAG_W-1:0] tag_out,
  output logic             ready
);
  fx_t pivot [T_MAX];
  fx_t a_ii;
  fx_t factor;

  always_comb begin
    ratio  = fx_div(a_ji, a_ii);
    recip  = fx_div(FX_ONE, a_ii);
    factor = use_ext ? ext_factor : (scale ? recip : ratio);
  end

  always_ff @(posedge clk) begin
    if (load) begin
      pivot <= pivot_in;
      a_ii  <= a_ii_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready   <= 1'b0;
      tag_out <= '0;
    end else begin
      ready   <= calc;
      if (calc) tag_out <= tag_in;
    end
  end

  always_ff @(posedge clk) begin
    if (calc) begin
      for (int k = 0; k < T_MAX; k++)
        new_row[k] <= scale ? fx_mul(row_in[k], factor)
                            : row_in[k] - fx_mul(pivot[k], factor);
    end
  end
endmodule
