// gj_inverse: inverse of a small square matrix by Gauss-Jordan elimination.
//
// The unit holds two memories, A (the matrix, loaded element by element from
// the multiplier) and A^-1 (set to the identity by init), and two row data
// paths (gj_datapath): one applies each elementary row operation to A, the
// other applies the same operation, in the same cycle, to A^-1. Rows are never
// moved: a row-permutation table row[] maps logical row i to a physical row,
// and a pivot exchange only swaps two entries of it. The sequence is:
//   forward:  for each i, if A[row[i]][i] is zero, exchange row[i] with the
//             first later row whose element in column i is non-zero (none:
//             the matrix is singular); then subtract multiples of the pivot
//             row from every later row, one row per cycle;
//   backward: for i from size-1 down to 1, clear column i in every earlier row;
//   final:    multiply each row of A^-1 by 1/a_ii.
// The row at logical index rd_row of the result is then read out whole on
// row_out. The memories, the two data paths, the read and write control and
// the algorithm follow the accelerator description. The pivot test uses
// column i of the later rows (the described pseudocode tests their own
// diagonal element); the state sequence and one-row-per-cycle pacing are this
// design's own.
//
// Interface: init (pulse) sets A^-1 = I and row[i] = i; wr_en writes A.
// start (pulse, with size <= T_MAX, >= 1) runs the elimination. ready is high
// when the result is available; singular is high instead when a pivot could
// not be found. row_out = A^-1[row[rd_row]], combinational.
// Timing: at most size^2 + 9*size + 4 cycles from start to ready.
module gj_inverse
  import atgp_pkg::*;
#(
  parameter int unsigned T_MAX = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       init,
  input  logic                       wr_en,
  input  logic [$clog2(T_MAX)-1:0]   wr_row,
  input  logic [$clog2(T_MAX)-1:0]   wr_col,
  input  fx_t                        wr_data,
  input  logic                       start,
  input  logic [$clog2(T_MAX+1)-1:0] size,
  input  logic [$clog2(T_MAX)-1:0]   rd_row,
  output fx_t                        row_out [T_MAX],
  output logic                       ready,
  output logic                       singular
);
  localparam int unsigned RW = $clog2(T_MAX);
  localparam int unsigned SW = $clog2(T_MAX+1);

  typedef enum logic [3:0] {
    S_IDLE, S_FPIV, S_FLOAD, S_FELIM, S_FDRAIN, S_FDRAIN2,
    S_BLOAD, S_BELIM, S_BDRAIN, S_BDRAIN2,
    S_SLOAD, S_SCALC, S_SDRAIN, S_SDRAIN2, S_DONE, S_SING
  } state_e;

  state_e        state;
  fx_t           A    [T_MAX][T_MAX];
  fx_t           Ainv [T_MAX][T_MAX];
  logic [RW-1:0] row  [T_MAX];
  logic [SW-1:0] i, j;

  // pivot search (read control)
  logic          piv_zero, piv_found;
  logic [SW-1:0] piv_j;
  always_comb begin
    piv_zero  = (A[row[i[RW-1:0]]][i[RW-1:0]] == '0);
    piv_found = 1'b0;
    piv_j     = '0;
    for (int k = T_MAX - 1; k >= 0; k--) begin
      if (SW'(k) > i && SW'(k) < size && A[row[k]][i[RW-1:0]] != '0) begin
        piv_found = 1'b1;
        piv_j     = SW'(k);
      end
    end
  end

  // data paths
  logic          dp_load, dp_calc, dp_scale;
  fx_t           ratio_a, recip_a;
  fx_t           new_a [T_MAX];
  fx_t           new_b [T_MAX];
  logic [RW-1:0] tag_a, tag_b;
  logic          rdy_a, rdy_b;
  logic [RW-1:0] prow_i, prow_j;

  assign prow_i = row[i[RW-1:0]];
  assign prow_j = row[j[RW-1:0]];

  always_comb begin
    dp_load  = (state == S_FLOAD) || (state == S_BLOAD) || (state == S_SLOAD);
    dp_calc  = (state == S_FELIM) || (state == S_BELIM) || (state == S_SCALC);
    dp_scale = (state == S_SCALC);
  end

  gj_datapath #(.T_MAX(T_MAX), .TAG_W(RW)) u_dp_a (
    .clk, .rst_n,
    .load      (dp_load),
    .pivot_in  (A[prow_i]),
    .a_ii_in   (A[prow_i][i[RW-1:0]]),
    .calc      (dp_calc && !dp_scale),
    .scale     (1'b0),
    .use_ext   (1'b0),
    .ext_factor('0),
    .a_ji      (A[prow_j][i[RW-1:0]]),
    .row_in    (A[prow_j]),
    .tag_in    (prow_j),
    .ratio     (ratio_a),
    .recip     (recip_a),
    .new_row   (new_a),
    .tag_out   (tag_a),
    .ready     (rdy_a)
  );

  gj_datapath #(.T_MAX(T_MAX), .TAG_W(RW)) u_dp_b (
    .clk, .rst_n,
    .load      (dp_load),
    .pivot_in  (Ainv[prow_i]),
    .a_ii_in   (A[prow_i][i[RW-1:0]]),
    .calc      (dp_calc),
    .scale     (dp_scale),
    .use_ext   (1'b1),
    .ext_factor(dp_scale ? recip_a : ratio_a),
    .a_ji      (A[prow_j][i[RW-1:0]]),
    .row_in    (dp_scale ? Ainv[prow_i] : Ainv[prow_j]),
    .tag_in    (dp_scale ? prow_i : prow_j),
    .ratio     (),
    .recip     (),
    .new_row   (new_b),
    .tag_out   (tag_b),
    .ready     (rdy_b)
  );

  assign row_out = Ainv[row[rd_row]];
  assign ready    = (state == S_DONE);
  assign singular = (state == S_SING);

  // memories (write control)
  always_ff @(posedge clk) begin
    if (init) begin
      for (int r = 0; r < T_MAX; r++)
        for (int c = 0; c < T_MAX; c++)
          Ainv[r][c] <= (r == c) ? FX_ONE : '0;
    end else if (rdy_b) begin
      Ainv[tag_b] <= new_b;
    end
    if (wr_en && state == S_IDLE) A[wr_row][wr_col] <= wr_data;
    else if (rdy_a) A[tag_a] <= new_a;
  end

  // sequencing (read control)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i     <= '0;
      j     <= '0;
      for (int r = 0; r < T_MAX; r++) row[r] <= RW'(r);
    end else begin
      if (init) for (int r = 0; r < T_MAX; r++) row[r] <= RW'(r);
      unique case (state)
        S_IDLE, S_DONE, S_SING: begin
          if (start) begin
            state <= S_FPIV;
            i     <= '0;
          end else if (init) begin
            state <= S_IDLE;
          end
        end
        S_FPIV: begin
          if (!piv_zero) begin
            state <= S_FLOAD;
          end else if (piv_found) begin
            row[i[RW-1:0]]     <= row[piv_j[RW-1:0]];
            row[piv_j[RW-1:0]] <= row[i[RW-1:0]];
            state              <= S_FLOAD;
          end else begin
            state <= S_SING;
          end
        end
        S_FLOAD: begin
          j <= i + 1'b1;
          if (i + 1'b1 >= size) begin
            // last column: forward pass complete
            state <= (size > 1) ? S_BLOAD : S_SLOAD;
            i     <= (size > 1) ? size - 1'b1 : '0;
          end else begin
            state <= S_FELIM;
          end
        end
        S_FELIM: begin
          j <= j + 1'b1;
          if (j + 1'b1 >= size) state <= S_FDRAIN;
        end
        S_FDRAIN:  state <= S_FDRAIN2;
        S_FDRAIN2: begin
          i     <= i + 1'b1;
          state <= S_FPIV;
        end
        S_BLOAD: begin
          j     <= i - 1'b1;
          state <= S_BELIM;
        end
        S_BELIM: begin
          j <= j - 1'b1;
          if (j == '0) state <= S_BDRAIN;
        end
        S_BDRAIN:  state <= S_BDRAIN2;
        S_BDRAIN2: begin
          if (i == SW'(1)) begin
            i     <= '0;
            state <= S_SLOAD;
          end else begin
            i     <= i - 1'b1;
            state <= S_BLOAD;
          end
        end
        S_SLOAD: state <= S_SCALC;
        S_SCALC: begin
          if (i + 1'b1 >= size) begin
            state <= S_SDRAIN;
          end else begin
            i     <= i + 1'b1;
            state <= S_SLOAD;
          end
        end
        S_SDRAIN:  state <= S_SDRAIN2;
        S_SDRAIN2: state <= S_DONE;
        default:   state <= S_IDLE;
      endcase
    end
  end
endmodule
