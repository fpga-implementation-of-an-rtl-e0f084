// tb_atgp_full: end-to-end test of the ATGP-OSP accelerator at its default
// size (256 bands maximum, 32 targets, 512-pixel FIFO), with 224 bands in use
// as in an AVIRIS scene.
//
// A host model follows the bus protocol: it streams the image into the write
// FIFO, and for every index it reads back it writes the selected pixel and
// then the image again. One run: 224 bands, 48 pixels, 4 targets, of which
// 3 are planted.
// Checks: every reported index against the fixed-point reference model
// (atgp_ref_pkg), the planted targets in the order of their amplitudes, the
// number of indices, done/error, and that each mechanism of the design
// occurred at least once: image prefetch into the pixel FIFO while the
// projector is built, write-FIFO-full back-pressure, a new maximum in the
// maximum-length unit, diagonal and off-diagonal subtractions. (Pixel-FIFO
// overflow and the singular stop need a deeper image or degenerate data and
// are covered by tb_atgp_osp_unit.)
module tb_atgp_full;
  import atgp_pkg::*;
  import atgp_ref_pkg::*;

  localparam int NB = 256, TM = 32;
  localparam int BW = $clog2(NB+1), TW = $clog2(TM+1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                start = 1'b0;
  logic [BW-1:0]       num_bands;
  logic [IDX_W-1:0]    num_pixels;
  logic [TW-1:0]       num_targets;
  logic                wf_push = 1'b0;
  logic [2*DATA_W-1:0] wf_data = '0;
  logic                wf_full;
  logic                rf_pop = 1'b0;
  logic [IDX_W-1:0]    rf_data;
  logic                rf_empty;
  phase_e              phase;
  logic                done, error;

  atgp_osp_unit dut (
    .clk, .rst_n, .start, .num_bands, .num_pixels, .num_targets, .wf_push,
    .wf_data, .wf_full, .rf_pop, .rf_data, .rf_empty, .phase, .done, .error
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_prefetch = 0, n_pf_full = 0, n_wf_full = 0, n_diag = 0, n_offdiag = 0;
  int n_newmax = 0, n_singular = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pf_push && (phase inside {PH_GRAM, PH_INV, PH_MMUL, PH_PMUL})) n_prefetch++;
    if (dut.pf_full && dut.u_ctrl.stream_on) n_pf_full++;
    if (wf_full && wf_push) n_wf_full++;
    if (dut.u_subtractor.new_data && dut.res_r == dut.res_c) n_diag++;
    if (dut.u_subtractor.new_data && dut.res_r != dut.res_c) n_offdiag++;
    if (dut.u_max_length.update && dut.u_max_length.have_max) n_newmax++;
    if (error) n_singular++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic push_word(input logic [2*DATA_W-1:0] w);
    @(negedge clk);
    if (error) return;   // the accelerator stopped; drop the rest
    while (wf_full && !error) begin
      wf_push = 1'b1;   // keep requesting: counts back-pressure cycles
      wf_data = w;
      @(negedge clk);
    end
    wf_push = 1'b1;
    wf_data = w;
    @(posedge clk);
  endtask

  task automatic push_pixel(input int p, input int nb);
    for (int b = 0; b < nb; b += 2) push_word({img[p][b+1], img[p][b]});
  endtask

  task automatic push_image(input int r, input int nb);
    for (int p = 0; p < r; p++) push_pixel(p, nb);
    @(negedge clk);
    wf_push = 1'b0;
  endtask

  task automatic run(input int r, input int nb, input int t, input int n_planted,
                     input int seed, input bit zero_image);
    int exp_idx [MAXT];
    int got [MAXT];
    int sing, n_got;
    longint t0;
    make_image(r, nb, n_planted, seed, zero_image);
    sing = run_atgp(r, nb, t, exp_idx);
    @(negedge clk);
    rst_n = 1'b0;      // every run starts from reset (required after an error)
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    num_bands   = BW'(nb);
    num_pixels  = IDX_W'(r);
    num_targets = TW'(t);
    start       = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cycles;
    push_image(r, nb);
    n_got = 0;
    while (n_got < t && !error) begin
      @(negedge clk);
      if (!rf_empty) begin
        got[n_got] = int'(rf_data);
        rf_pop = 1'b1;
        @(negedge clk);
        rf_pop = 1'b0;
        n_got++;
        if (n_got < t) begin
          push_pixel(got[n_got-1], nb);
          push_image(r, nb);
        end
      end
    end
    while (!done && !error) @(negedge clk);
    $display("run r=%0d nb=%0d t=%0d: %0d indices, error=%0b, %0d cycles",
             r, nb, t, n_got, error, cycles - t0);
    if (sing != 0) begin
      check(error, "singular U^T U reported as error");
    end else begin
      check(done && !error, "run ends in done");
      check(n_got == t, $sformatf("received %0d of %0d indices", n_got, t));
      for (int q = 0; q < n_got; q++) begin
        check(got[q] == exp_idx[q], $sformatf("target %0d: got %0d expected %0d", q, got[q], exp_idx[q]));
        if (q < n_planted)
          check(got[q] == planted_idx[q], $sformatf("target %0d: got %0d planted %0d", q, got[q], planted_idx[q]));
      end
    end
  endtask

  initial begin
    num_bands = '0; num_pixels = '0; num_targets = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(48, 224, 4, 3, 23, 1'b0);
    check(n_prefetch > 0, "prefetch during projector build");
    check(n_wf_full  > 0, "write FIFO full");
    check(n_diag     > 0, "subtractor diagonal element");
    check(n_offdiag  > 0, "subtractor off-diagonal element");
    check(n_newmax   > 0, "maximum replaced");
    $display("mechanisms: prefetch=%0d pf_full=%0d wf_full=%0d diag=%0d offdiag=%0d newmax=%0d singular=%0d",
             n_prefetch, n_pf_full, n_wf_full, n_diag, n_offdiag, n_newmax, n_singular);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
