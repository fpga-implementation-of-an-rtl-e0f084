// atgp_ctrl: control unit of the ATGP-OSP accelerator.
//
// It walks the accelerator through the detection procedure, one phase per
// step:
//   SCAN   read every pixel from the write FIFO (two components per word) into
//          the maximum-length unit;
//   INDEX  push the index of the longest pixel into the read FIFO; stop when
//          num_targets indices have been reported;
//   LOADU  take the selected pixel, which the host now writes, from the write
//          FIFO and store it as column k of U (and row k of U^T); from here on
//          the host streams the whole image again and the control unit moves
//          it into the pixel FIFO in the background (prefetching) while the
//          next phases compute the projector;
//   GRAM   issue the k*k products U^T U into the multiplier (results go to the
//          inverse unit's A memory, which is reset to the identity for A^-1);
//   INV    run the Gauss-Jordan inversion;
//   MMUL   issue the k*nb products (U^T U)^-1 U^T;
//   PMUL   issue the nb*nb products U (U^T U)^-1 U^T; the subtractor turns
//          them into P_U = I - U (U^T U)^-1 U^T;
//   PROJ   for every pixel popped from the pixel FIFO, issue nb/2 row pairs of
//          P_U to the two multipliers; their outputs, two components of P_U f
//          per cycle, feed the maximum-length unit; then back to INDEX.
// Each product phase issues one product per cycle and waits for the pipeline
// to drain before the next phase reads the memory it filled. The order of the
// steps and the background prefetching follow the accelerator description;
// the phase encoding, loop orders and handshakes are this design's own.
//
// Interface: scalar status in, scalar strobes and indices out; all data
// routing is done by the enclosing unit from phase. iss_r/iss_c are the row
// and column of the product issued with issue; u_band/u_hi/u_we address the
// U write of LOADU; k is the number of target columns stored in U.
module atgp_ctrl
  import atgp_pkg::*;
#(
  parameter int unsigned N_BANDS = 256,
  parameter int unsigned T_MAX   = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(N_BANDS+1)-1:0] num_bands,
  input  logic [IDX_W-1:0]             num_pixels,
  input  logic [$clog2(T_MAX+1)-1:0]   num_targets,
  input  logic                         wf_empty,
  input  logic                         pf_full,
  input  logic                         pf_empty,
  input  logic                         rf_full,
  input  logic                         pipe_busy,
  input  logic                         ml_ready,
  input  logic                         inv_ready,
  input  logic                         inv_singular,
  output phase_e                       phase,
  output logic                         wf_pop,
  output logic                         pf_push,
  output logic                         pf_pop,
  output logic                         rf_push,
  output logic                         ml_clear,
  output logic                         ml_scan_data,
  output logic                         u_we,
  output logic                         u_hi,
  output logic [$clog2(N_BANDS)-1:0]   u_band,
  output logic [$clog2(T_MAX+1)-1:0]   k,
  output logic                         inv_init,
  output logic                         inv_start,
  output logic                         issue,
  output logic [$clog2(N_BANDS)-1:0]   iss_r,
  output logic [$clog2(N_BANDS)-1:0]   iss_c
);
  localparam int unsigned BW = $clog2(N_BANDS+1);
  localparam int unsigned BI = $clog2(N_BANDS);
  localparam int unsigned TW = $clog2(T_MAX+1);

  logic [BW-1:0]    cr, cc;          // product loop counters (row, column)
  logic             draining;        // all products issued, waiting for the pipeline
  logic             have_pix;        // PROJ: a pixel is held for projection
  logic [BW-1:0]    sb;              // SCAN / stream: pair counter in the pixel
  logic [IDX_W-1:0] sp;              // SCAN / PROJ: pixel counter
  logic [BW-1:0]    stb;             // stream: pair counter
  logic [IDX_W-1:0] stp;             // stream: pixel counter
  logic             stream_on;
  logic [TW-1:0]    found;           // indices reported so far
  logic             inv_started;

  wire [BW-1:0] pairs      = BW'(num_bands >> 1);
  wire [BW-1:0] k_bw       = BW'(k);
  wire          scan_more  = (sp < num_pixels);
  wire          scan_pop   = (phase == PH_SCAN) && scan_more && !wf_empty && !ml_clear;
  wire          stream_pop = stream_on && !wf_empty && !(pf_full && stb == '0);
  wire          loadu_pop  = (phase == PH_LOADU) && !wf_empty && u_hi;

  assign wf_pop       = scan_pop || stream_pop || loadu_pop;
  assign pf_push      = stream_pop;
  assign ml_scan_data = scan_pop;
  assign u_we         = (phase == PH_LOADU) && !wf_empty;
  assign u_band       = BI'({sb, u_hi});

  always_comb begin
    issue = 1'b0;
    iss_r = BI'(cr);
    iss_c = BI'(cc);
    unique case (phase)
      PH_GRAM, PH_MMUL, PH_PMUL: issue = !draining;
      PH_PROJ:                   begin issue = have_pix; iss_r = BI'({cr, 1'b0}); end
      default: ;
    endcase
    pf_pop  = (phase == PH_PROJ) && !have_pix && (sp < num_pixels) && !pf_empty;
    rf_push = (phase == PH_INDEX) && !rf_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      cr          <= '0;
      cc          <= '0;
      draining    <= 1'b0;
      have_pix    <= 1'b0;
      sb          <= '0;
      sp          <= '0;
      stb         <= '0;
      stp         <= '0;
      stream_on   <= 1'b0;
      found       <= '0;
      k           <= '0;
      u_hi        <= 1'b0;
      ml_clear    <= 1'b0;
      inv_init    <= 1'b0;
      inv_start   <= 1'b0;
      inv_started <= 1'b0;
    end else begin
      ml_clear  <= 1'b0;
      inv_init  <= 1'b0;
      inv_start <= 1'b0;

      // background prefetch of the image into the pixel FIFO
      if (stream_pop) begin
        if (stb == pairs - 1'b1) begin
          stb <= '0;
          stp <= stp + 1'b1;
          if (stp == num_pixels - 1'b1) stream_on <= 1'b0;
        end else begin
          stb <= stb + 1'b1;
        end
      end

      unique case (phase)
        PH_IDLE, PH_DONE, PH_ERROR: begin
          if (start) begin
            phase     <= PH_SCAN;
            ml_clear  <= 1'b1;
            sb        <= '0;
            sp        <= '0;
            found     <= '0;
            k         <= '0;
            stream_on <= 1'b0;
          end
        end

        PH_SCAN: begin
          if (scan_pop) begin
            if (sb == pairs - 1'b1) begin
              sb <= '0;
              sp <= sp + 1'b1;
            end else begin
              sb <= sb + 1'b1;
            end
          end
          if (ml_ready && !ml_clear) phase <= PH_INDEX;
        end

        PH_INDEX: begin
          if (!rf_full) begin
            found <= found + 1'b1;
            if (found + 1'b1 >= num_targets) begin
              phase <= PH_DONE;
            end else begin
              phase <= PH_LOADU;
              sb    <= '0;
              u_hi  <= 1'b0;
            end
          end
        end

        PH_LOADU: begin
          if (!wf_empty) begin
            u_hi <= !u_hi;
            if (u_hi) begin
              if (sb == pairs - 1'b1) begin
                sb        <= '0;
                k         <= k + 1'b1;
                stream_on <= 1'b1;
                stb       <= '0;
                stp       <= '0;
                inv_init  <= 1'b1;
                cr        <= '0;
                cc        <= '0;
                draining  <= 1'b0;
                phase     <= PH_GRAM;
              end else begin
                sb <= sb + 1'b1;
              end
            end
          end
        end

        PH_GRAM: begin
          if (!draining) begin
            if (cc == k_bw - 1'b1) begin
              cc <= '0;
              if (cr == k_bw - 1'b1) draining <= 1'b1;
              else                   cr <= cr + 1'b1;
            end else begin
              cc <= cc + 1'b1;
            end
          end else if (!pipe_busy) begin
            phase       <= PH_INV;
            inv_start   <= 1'b1;
            inv_started <= 1'b0;
          end
        end

        PH_INV: begin
          inv_started <= 1'b1;
          if (inv_started && inv_singular) begin
            phase <= PH_ERROR;
          end else if (inv_started && inv_ready) begin
            phase    <= PH_MMUL;
            cr       <= '0;
            cc       <= '0;
            draining <= 1'b0;
          end
        end

        PH_MMUL: begin   // cr: band (row of U), cc: target (row of the inverse)
          if (!draining) begin
            if (cc == k_bw - 1'b1) begin
              cc <= '0;
              if (cr == pairs + pairs - 1'b1) draining <= 1'b1;
              else                            cr <= cr + 1'b1;
            end else begin
              cc <= cc + 1'b1;
            end
          end else if (!pipe_busy) begin
            phase    <= PH_PMUL;
            cr       <= '0;
            cc       <= '0;
            draining <= 1'b0;
          end
        end

        PH_PMUL: begin   // cr, cc: row and column of P_U
          if (!draining) begin
            if (cc == pairs + pairs - 1'b1) begin
              cc <= '0;
              if (cr == pairs + pairs - 1'b1) draining <= 1'b1;
              else                            cr <= cr + 1'b1;
            end else begin
              cc <= cc + 1'b1;
            end
          end else if (!pipe_busy) begin
            phase    <= PH_PROJ;
            ml_clear <= 1'b1;
            sp       <= '0;
            cr       <= '0;
            have_pix <= 1'b0;
          end
        end

        PH_PROJ: begin   // cr: row pair of P_U, sp: pixel
          if (pf_pop) begin
            have_pix <= 1'b1;
            cr       <= '0;
          end else if (have_pix) begin
            if (cr == pairs - 1'b1) begin
              have_pix <= 1'b0;
              sp       <= sp + 1'b1;
            end else begin
              cr <= cr + 1'b1;
            end
          end
          if (ml_ready && !ml_clear) phase <= PH_INDEX;
        end

        default: phase <= PH_IDLE;
      endcase
    end
  end

  // the write FIFO must never be popped by two consumers at once
  a_one_consumer: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({scan_pop, stream_pop, loadu_pop}));
endmodule
