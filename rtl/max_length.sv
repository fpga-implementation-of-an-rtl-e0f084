// max_length: finds the pixel of largest squared length in a stream of pixels.
//
// Pixel components arrive two at a time (data_i, data_j), matching the two
// components per cycle delivered by the external-memory path and by the two
// multipliers that compute P_U f. Two multipliers square them, two adders add
// the squares to the running sum held in the accumulator. The control unit
// counts component pairs; after the last pair of a pixel it compares the
// completed length with the stored maximum and, if it is larger, stores the
// length in the max-value register and the pixel number in the max-index
// register. After the last pixel, ready rises and max_index holds the
// answer. This follows the accelerator description (two multipliers, two
// adders, accumulator, comparator, max value / max index registers). The
// sum is kept at full precision (no shift back to the word format), ties keep
// the earlier pixel, and the whole update is done in the cycle of new_data:
// these are this design's own choices.
//
// Interface: clear (one cycle) starts a new search with num_bands components
// per pixel (even, >= 2) and num_pixels pixels (>= 1). new_data qualifies a
// component pair. Timing: ready is high from the cycle after the last pair
// until the next clear.
module max_length
  import atgp_pkg::*;
#(
  parameter int unsigned N_BANDS = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic [$clog2(N_BANDS+1)-1:0] num_bands,
  input  logic [IDX_W-1:0]             num_pixels,
  input  logic                         new_data,
  input  fx_t                          data_i,
  input  fx_t                          data_j,
  output logic [IDX_W-1:0]             max_index,
  output logic [2*DATA_W+$clog2(N_BANDS)-1:0] max_value,
  output logic                         ready
);
  localparam int unsigned AW = 2*DATA_W + $clog2(N_BANDS);
  localparam int unsigned CW = $clog2(N_BANDS+1);
  typedef logic [AW-1:0] acc_t;

  acc_t             acc;          // running sum of the current pixel
  acc_t             len_now;      // sum including the current pair
  logic [CW-1:0]    pair_cnt;     // pairs already summed for this pixel
  logic [IDX_W-1:0] cur_index;    // index of the pixel being summed
  logic             have_max;
  logic             last_pair;
  logic             update;

  always_comb begin
    fxw_t sq_i, sq_j;
    sq_i      = fxw_t'(data_i) * fxw_t'(data_i);
    sq_j      = fxw_t'(data_j) * fxw_t'(data_j);
    len_now   = acc + acc_t'(unsigned'(sq_i)) + acc_t'(unsigned'(sq_j));
    last_pair = (pair_cnt == CW'((num_bands >> 1) - 1'b1));
    update    = new_data && last_pair && (!have_max || len_now > max_value);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      pair_cnt  <= '0;
      cur_index <= '0;
      have_max  <= 1'b0;
      max_value <= '0;
      max_index <= '0;
      ready     <= 1'b0;
    end else if (clear) begin
      acc       <= '0;
      pair_cnt  <= '0;
      cur_index <= '0;
      have_max  <= 1'b0;
      max_value <= '0;
      max_index <= '0;
      ready     <= 1'b0;
    end else if (new_data && !ready) begin
      if (update) begin
        max_value <= len_now;
        max_index <= cur_index;
        have_max  <= 1'b1;
      end
      if (last_pair) begin
        acc       <= '0;
        pair_cnt  <= '0;
        cur_index <= cur_index + 1'b1;
        if (cur_index == num_pixels - 1'b1) ready <= 1'b1;
      end else begin
        acc      <= len_now;
        pair_cnt <= pair_cnt + 1'b1;
      end
    end
  end
endmodule
