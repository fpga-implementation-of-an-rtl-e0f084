// atgp_osp_unit: ATGP-OSP target-detection accelerator (the reconfigurable
// unit that sits on the processor bus).
//
// The automatic target-generation process finds t target pixels in a
// hyperspectral image: the first is the pixel of largest length; each further
// one is the pixel whose projection onto the orthogonal complement of the
// targets found so far, P_U f with P_U = I - U (U^T U)^-1 U^T, is longest.
// The unit computes this with
//   write FIFO / read FIFO   bus-side buffers (pixel data in, target indices out)
//   pixel FIFO               one FIFO per band, prefetched while P_U is built
//   memories U, U^T          the targets found so far, by rows and by columns
//   memory M                 (U^T U)^-1 U^T, stored by columns
//   memory P_U               the projector, two rows readable per cycle
//   two multipliers          pipelined N-lane dot-product units
//   inverse                  Gauss-Jordan inversion of U^T U
//   subtractor               I - U (U^T U)^-1 U^T, element by element
//   maximum length           arg max of the squared lengths
//   control unit             sequences the steps (atgp_ctrl)
// The block set and the step sequence follow the accelerator description;
// the number format (Q15.16 fixed point, see atgp_pkg), handshakes and port
// layout are this design's own.
//
// Host protocol: set num_bands (even, 2..N_BANDS; pad an odd band count with a
// zero band), num_pixels and num_targets (1..T_MAX), pulse start, then write
// the whole image into the write FIFO, pixel after pixel, two components per
// word ({band b+1, band b} in {upper, lower} half). For each index read from
// the read FIFO except the last, write that pixel once, then the whole image
// again. done rises when num_targets indices have been pushed; error rises
// if U^T U turns out singular (the same pixel selected twice, for example).
// Timing per iteration with k targets found and nb bands: about k^2 + k*nb +
// nb^2 cycles to build P_U, plus (nb/2 + 1) cycles per pixel to project.
module atgp_osp_unit
  import atgp_pkg::*;
#(
  parameter int unsigned N_BANDS   = 256,   // maximum number of bands
  parameter int unsigned T_MAX     = 32,    // maximum number of targets
  parameter int unsigned PIX_DEPTH = 512,   // pixel FIFO depth in pixels
  parameter int unsigned WF_DEPTH  = 16,    // write FIFO depth in words
  parameter int unsigned RF_DEPTH  = 32     // read FIFO depth in indices
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // configuration
  input  logic                         start,
  input  logic [$clog2(N_BANDS+1)-1:0] num_bands,
  input  logic [IDX_W-1:0]             num_pixels,
  input  logic [$clog2(T_MAX+1)-1:0]   num_targets,
  // write FIFO (bus to accelerator)
  input  logic                         wf_push,
  input  logic [2*DATA_W-1:0]          wf_data,
  output logic                         wf_full,
  // read FIFO (accelerator to bus)
  input  logic                         rf_pop,
  output logic [IDX_W-1:0]             rf_data,
  output logic                         rf_empty,
  // status
  output phase_e                       phase,
  output logic                         done,
  output logic                         error
);
  localparam int unsigned BI  = $clog2(N_BANDS);
  localparam int unsigned BW  = $clog2(N_BANDS+1);
  localparam int unsigned TI  = $clog2(T_MAX);
  localparam int unsigned TW  = $clog2(T_MAX+1);
  localparam int unsigned TAG = 2*BI;

  // ---------------------------------------------------------------- control
  logic          wf_pop, wf_empty, pf_push, pf_pop, pf_full, pf_empty;
  logic          rf_push, rf_full, ml_clear, ml_scan_data, ml_ready;
  logic          u_we, u_hi, inv_init, inv_start, inv_ready, inv_singular;
  logic          issue, pipe_busy;
  logic [BI-1:0] u_band, iss_r, iss_c;
  logic [TW-1:0] k;

  atgp_ctrl #(.N_BANDS(N_BANDS), .T_MAX(T_MAX)) u_ctrl (
    .clk, .rst_n, .start, .num_bands, .num_pixels, .num_targets,
    .wf_empty, .pf_full, .pf_empty, .rf_full, .pipe_busy, .ml_ready,
    .inv_ready, .inv_singular, .phase, .wf_pop, .pf_push, .pf_pop, .rf_push,
    .ml_clear, .ml_scan_data, .u_we, .u_hi, .u_band, .k, .inv_init,
    .inv_start, .issue, .iss_r, .iss_c
  );

  assign done  = (phase == PH_DONE);
  assign error = (phase == PH_ERROR);

  // ------------------------------------------------------------- bus FIFOs
  logic [2*DATA_W-1:0] wf_dout;
  fx_t                 wf_lo, wf_hi;
  logic [IDX_W-1:0]    ml_index;

  sync_fifo #(.WIDTH(2*DATA_W), .DEPTH(WF_DEPTH)) u_write_fifo (
    .clk, .rst_n, .push(wf_push), .din(wf_data), .pop(wf_pop),
    .dout(wf_dout), .full(wf_full), .empty(wf_empty), .count()
  );
  assign wf_lo = fx_t'(wf_dout[DATA_W-1:0]);
  assign wf_hi = fx_t'(wf_dout[2*DATA_W-1:DATA_W]);

  sync_fifo #(.WIDTH(IDX_W), .DEPTH(RF_DEPTH)) u_read_fifo (
    .clk, .rst_n, .push(rf_push), .din(ml_index), .pop(rf_pop),
    .dout(rf_data), .full(rf_full), .empty(rf_empty), .count()
  );

  // ------------------------------------------------------------ pixel FIFO
  fx_t pix_bus [N_BANDS];
  fx_t f_reg   [N_BANDS];

  pixel_fifo #(.N_BANDS(N_BANDS), .DEPTH(PIX_DEPTH)) u_pixel_fifo (
    .clk, .rst_n, .num_bands, .new_data(pf_push), .data_i(wf_lo),
    .data_j(wf_hi), .read(pf_pop), .data_bus(pix_bus), .full(pf_full),
    .empty(pf_empty)
  );

  always_ff @(posedge clk) begin
    if (pf_pop) f_reg <= pix_bus;
  end

  // --------------------------------------------------------------- memories
  fx_t u_row    [T_MAX];  // U, row iss_r (one band of every target)
  fx_t u_row_b  [T_MAX];
  fx_t ut_row_a [N_BANDS]; // U^T, rows iss_r and iss_c (two targets)
  fx_t ut_row_b [N_BANDS];
  fx_t mt_row   [T_MAX];  // M = (U^T U)^-1 U^T by columns: column iss_c
  fx_t mt_row_b [T_MAX];
  fx_t p_row_a  [N_BANDS]; // P_U, rows iss_r and iss_r + 1
  fx_t p_row_b  [N_BANDS];
  fx_t inv_row  [T_MAX];  // (U^T U)^-1, row iss_c
  fx_t u_wdata;

  assign u_wdata = u_hi ? wf_hi : wf_lo;

  matrix_mem #(.ROWS(N_BANDS), .COLS(T_MAX)) u_mem_u (
    .clk, .we(u_we), .wr_row(u_band), .wr_col(TI'(k)), .wr_data(u_wdata),
    .rd_row_a(iss_r), .rd_row_b(iss_r), .row_a(u_row), .row_b(u_row_b)
  );

  matrix_mem #(.ROWS(T_MAX), .COLS(N_BANDS)) u_mem_ut (
    .clk, .we(u_we), .wr_row(TI'(k)), .wr_col(u_band), .wr_data(u_wdata),
    .rd_row_a(TI'(iss_r)), .rd_row_b(TI'(iss_c)), .row_a(ut_row_a),
    .row_b(ut_row_b)
  );

  // multiplier results
  fx_t            mul_a_res, mul_b_res;
  logic           mul_a_rdy, mul_b_rdy, mul_a_busy, mul_b_busy;
  logic [TAG-1:0] mul_a_tag, mul_b_tag;
  wire  [BI-1:0]  res_r = mul_a_tag[TAG-1:BI];
  wire  [BI-1:0]  res_c = mul_a_tag[BI-1:0];

  matrix_mem #(.ROWS(N_BANDS), .COLS(T_MAX)) u_mem_m (
    .clk, .we(phase == PH_MMUL && mul_a_rdy), .wr_row(res_r),
    .wr_col(TI'(res_c)), .wr_data(mul_a_res),
    .rd_row_a(iss_c), .rd_row_b(iss_c), .row_a(mt_row), .row_b(mt_row_b)
  );

  logic          sub_rdy;
  fx_t           sub_res;
  logic [BI-1:0] sub_r, sub_c;

  matrix_mem #(.ROWS(N_BANDS), .COLS(N_BANDS)) u_mem_p (
    .clk, .we(sub_rdy), .wr_row(sub_r), .wr_col(sub_c), .wr_data(sub_res),
    .rd_row_a(iss_r), .rd_row_b(iss_r | BI'(1)), .row_a(p_row_a),
    .row_b(p_row_b)
  );

  // ---------------------------------------------------------------- inverse
  gj_inverse #(.T_MAX(T_MAX)) u_inverse (
    .clk, .rst_n, .init(inv_init), .wr_en(phase == PH_GRAM && mul_a_rdy),
    .wr_row(TI'(res_r)), .wr_col(TI'(res_c)), .wr_data(mul_a_res),
    .start(inv_start), .size(k), .rd_row(TI'(iss_c)), .row_out(inv_row),
    .ready(inv_ready), .singular(inv_singular)
  );

  // ------------------------------------------------------------ multipliers
  fx_t           op_a [N_BANDS];
  fx_t           op_b [N_BANDS];
  logic [BW-1:0] mul_len;

  always_comb begin
    for (int x = 0; x < N_BANDS; x++) begin
      op_a[x] = '0;
      op_b[x] = '0;
    end
    mul_len = num_bands;
    unique case (phase)
      PH_GRAM: begin                      // (U^T U)[r][c] = U^T[r] . U^T[c]
        op_a = ut_row_a;
        op_b = ut_row_b;
      end
      PH_MMUL: begin                      // M[c][r] = inv[c] . U[r]
        for (int x = 0; x < T_MAX; x++) begin
          op_a[x] = inv_row[x];
          op_b[x] = u_row[x];
        end
        mul_len = BW'(k);
      end
      PH_PMUL: begin                      // (U M)[r][c] = U[r] . M^T[c]
        for (int x = 0; x < T_MAX; x++) begin
          op_a[x] = u_row[x];
          op_b[x] = mt_row[x];
        end
        mul_len = BW'(k);
      end
      default: begin                      // PROJ: P_U[2m] . f
        op_a = p_row_a;
        op_b = f_reg;
      end
    endcase
  end

  vec_mult #(.N(N_BANDS), .TAG_W(TAG)) u_mult_a (
    .clk, .rst_n, .calc(issue), .len(mul_len), .a(op_a), .b(op_b),
    .tag({iss_r, iss_c}), .result(mul_a_res), .ready(mul_a_rdy),
    .tag_out(mul_a_tag), .busy(mul_a_busy)
  );

  vec_mult #(.N(N_BANDS), .TAG_W(TAG)) u_mult_b (   // P_U[2m+1] . f
    .clk, .rst_n, .calc(issue && phase == PH_PROJ), .len(num_bands),
    .a(p_row_b), .b(f_reg), .tag({iss_r, iss_c}), .result(mul_b_res),
    .ready(mul_b_rdy), .tag_out(mul_b_tag), .busy(mul_b_busy)
  );

  // -------------------------------------------------------------- subtractor
  pu_subtractor #(.POS_W(BI)) u_subtractor (
    .clk, .rst_n, .new_data(phase == PH_PMUL && mul_a_rdy), .data(mul_a_res),
    .row(res_r), .col(res_c), .ready(sub_rdy), .result(sub_res),
    .row_out(sub_r), .col_out(sub_c)
  );

  assign pipe_busy = mul_a_busy || mul_b_busy || sub_rdy;

  // ---------------------------------------------------------- maximum length
  logic [2*DATA_W+BI-1:0] ml_value;

  max_length #(.N_BANDS(N_BANDS)) u_max_length (
    .clk, .rst_n, .clear(ml_clear), .num_bands, .num_pixels,
    .new_data(ml_scan_data || (phase == PH_PROJ && mul_a_rdy)),
    .data_i(phase == PH_PROJ ? mul_a_res : wf_lo),
    .data_j(phase == PH_PROJ ? mul_b_res : wf_hi),
    .max_index(ml_index), .max_value(ml_value), .ready(ml_ready)
  );

  // both multipliers run in lock step while projecting
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (phase == PH_PROJ) |-> (mul_a_rdy == mul_b_rdy));
endmodule
