// pixel_fifo: the pixel input buffer ("FIFO pixels").
//
// It is made of N_BANDS FIFOs, one per spectral band, and a control unit.
// Components arrive two at a time (data_i for band b, data_j for band b+1,
// the two components that are read from external memory together); the
// control unit steers each pair to the FIFOs of its two bands over the write
// bus and advances b. A read pops one complete pixel: the heads of all FIFOs
// appear together on the data bus. This lets the image be prefetched while
// the accelerator is still computing the projector. The organisation (one
// FIFO per band, pair-wise writes, whole-pixel reads, full and empty flags)
// follows the accelerator description; the depth (512 pixels, which matches
// the block-RAM count reported for this buffer), the shared pixel pointers
// and the runtime band count are this design's own.
//
// Interface: new_data writes a pair (ignored when full is high and a new
// pixel would start). num_bands (even, >= 2) is the number of bands in use;
// lanes at and above it are read as zero. read pops the head pixel (ignored
// when empty). full: no free pixel slot for a new pixel; empty: no complete
// pixel stored. Timing: a pixel becomes readable the cycle after its last
// pair is written; data_bus shows the head pixel combinationally.
module pixel_fifo
  import atgp_pkg::*;
#(
  parameter int unsigned N_BANDS = 256,
  parameter int unsigned DEPTH   = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [$clog2(N_BANDS+1)-1:0] num_bands,
  input  logic                         new_data,
  input  fx_t                          data_i,
  input  fx_t                          data_j,
  input  logic                         read,
  output fx_t                          data_bus [N_BANDS],
  output logic                         full,
  output logic                         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned BW = $clog2(N_BANDS+1);

  logic [BW-1:0]             band;     // band of data_i in the pixel being written
  logic [AW-1:0]             wp, rp;   // pixel slots
  logic [$clog2(DEPTH+1)-1:0] used;    // complete pixels stored

  wire wr_ok     = new_data && !(full && band == '0);
  wire last_pair = (band == BW'(num_bands - 2'd2));
  wire do_read   = read && !empty;
  wire done_pix  = wr_ok && last_pair;

  assign full  = (used == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (used == '0);

  // one FIFO memory per band
  for (genvar k = 0; k < N_BANDS; k++) begin : g_band
    fx_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_ok && (BW'(k) == band))       mem[wp] <= data_i;
      if (wr_ok && (BW'(k) == band + 1'b1)) mem[wp] <= data_j;
    end
    assign data_bus[k] = (BW'(k) < num_bands) ? mem[rp] : '0;
  end

  // control unit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      band <= '0;
      wp   <= '0;
      rp   <= '0;
      used <= '0;
    end else begin
      if (wr_ok) band <= last_pair ? '0 : band + BW'(2);
      if (done_pix) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_read)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      case ({done_pix, do_read})
        2'b10:   used <= used + 1'b1;
        2'b01:   used <= used - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) int'(used) <= DEPTH);
endmodule
