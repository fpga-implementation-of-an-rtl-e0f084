// tb_atgp_ctrl: self-checking test of the control unit on its own (8 bands
// maximum, 4 targets maximum). A behavioural environment stands in for the
// data path: an always-full write FIFO, a pixel FIFO that is never full and
// signals empty at random, a 4-cycle multiplier pipeline, a maximum-length
// model that becomes ready after the expected number of component pairs, and
// an inverse unit that answers 5 cycles after start. For every iteration the
// test counts what the control unit issued and compares it with the
// procedure: nb/2 scan pops per pixel, nb element writes to U (bands in
// order, column k), k*k Gram products, k*nb and nb*nb matrix products (every
// index pair exactly once, checked by sums), nb/2 projections per pixel, one
// pixel-FIFO pop per pixel and r*nb/2 prefetch pushes, and t read-FIFO pushes
// before done. A second run makes the inverse report a singular matrix.
module tb_atgp_ctrl;
  import atgp_pkg::*;
  localparam int NB = 8, TM = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0;
  logic [3:0]       num_bands;
  logic [IDX_W-1:0] num_pixels;
  logic [2:0]       num_targets;
  logic             wf_empty = 1'b0, pf_full = 1'b0, pf_empty = 1'b0, rf_full = 1'b0;
  logic             pipe_busy, ml_ready = 1'b0, inv_ready = 1'b0, inv_singular = 1'b0;
  phase_e           phase;
  logic             wf_pop, pf_push, pf_pop, rf_push, ml_clear, ml_scan_data;
  logic             u_we, u_hi, inv_init, inv_start, issue;
  logic [2:0]       u_band, iss_r, iss_c;
  logic [2:0]       k;

  atgp_ctrl #(.N_BANDS(NB), .T_MAX(TM)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // environment
  logic [3:0] pipe = '0;
  assign pipe_busy = |pipe;
  int  ml_pairs = 0, ml_target = 0, inv_wait = -1;
  bit  make_singular = 0;
  always @(posedge clk) begin
    pipe <= {pipe[2:0], issue && phase == PH_PROJ ? 1'b1 : issue};
    pf_empty <= ($urandom_range(0, 3) == 0);
    if (ml_clear) begin ml_ready <= 1'b0; ml_pairs = 0; end
    else if (ml_scan_data || (phase == PH_PROJ && pipe[3])) begin
      ml_pairs++;
      if (ml_pairs == ml_target) ml_ready <= 1'b1;
    end
    if (inv_init) begin inv_ready <= 1'b0; inv_singular <= 1'b0; end
    if (inv_start) inv_wait = 5;
    else if (inv_wait > 0) inv_wait--;
    else if (inv_wait == 0) begin
      inv_wait = -1;
      if (make_singular) inv_singular <= 1'b1; else inv_ready <= 1'b1;
    end
  end

  // counters per phase
  int c_scan, c_uwe, c_gram, c_mmul, c_pmul, c_proj, c_pfpop, c_pfpush, c_rf;
  int s_gram, s_mmul, s_pmul, band_err, col_err;
  always @(posedge clk) if (rst_n) begin
    if (ml_scan_data) c_scan++;
    if (u_we) begin
      if (int'(u_band) != c_uwe % NB) band_err++;
      c_uwe++;
    end
    if (issue && phase == PH_GRAM) begin c_gram++; s_gram += 10 * iss_r + iss_c; end
    if (issue && phase == PH_MMUL) begin c_mmul++; s_mmul += 10 * iss_r + iss_c; end
    if (issue && phase == PH_PMUL) begin c_pmul++; s_pmul += 10 * iss_r + iss_c; end
    if (issue && phase == PH_PROJ) c_proj++;
    if (pf_pop) c_pfpop++;
    if (pf_push) c_pfpush++;
    if (rf_push) c_rf++;
  end

  task automatic clear_counts();
    c_scan = 0; c_uwe = 0; c_gram = 0; c_mmul = 0; c_pmul = 0; c_proj = 0;
    c_pfpop = 0; c_pfpush = 0; c_rf = 0; s_gram = 0; s_mmul = 0; s_pmul = 0;
    band_err = 0; col_err = 0;
  endtask

  function automatic int pair_sum(input int nr, input int nc);
    int s = 0;
    for (int r = 0; r < nr; r++) for (int c = 0; c < nc; c++) s += 10 * r + c;
    return s;
  endfunction

  initial begin
    int nb, r, t, kk;
    nb = 6; r = 5; t = 4;
    clear_counts();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    num_bands = 4'(nb); num_pixels = IDX_W'(r); num_targets = 3'(t);
    ml_target = r * nb / 2;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (phase != PH_INDEX) @(negedge clk);
    check(c_scan == r * nb / 2, $sformatf("scan pops %0d", c_scan));
    for (int it = 1; it < t; it++) begin
      clear_counts();
      while (phase != PH_GRAM) @(negedge clk);
      kk = int'(k);
      check(kk == it, $sformatf("k=%0d in iteration %0d", kk, it));
      check(c_rf == 1, "one index pushed");
      check(c_uwe == nb && band_err == 0, $sformatf("U writes %0d, band errors %0d", c_uwe, band_err));
      while (phase != PH_INDEX && phase != PH_DONE) @(negedge clk);
      check(c_gram == kk * kk && s_gram == pair_sum(kk, kk), $sformatf("gram products %0d", c_gram));
      check(c_mmul == kk * nb && s_mmul == pair_sum(nb, kk), $sformatf("M products %0d", c_mmul));
      check(c_pmul == nb * nb && s_pmul == pair_sum(nb, nb), $sformatf("P products %0d", c_pmul));
      check(c_proj == r * nb / 2, $sformatf("projection issues %0d", c_proj));
      check(c_pfpop == r, $sformatf("pixel pops %0d", c_pfpop));
      check(c_pfpush == r * nb / 2, $sformatf("prefetch pushes %0d", c_pfpush));
    end
    @(negedge clk); @(negedge clk);
    check(phase == PH_DONE, "done after t indices");
    // singular run
    make_singular = 1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int n = 0; n < 400 && phase != PH_ERROR; n++) @(negedge clk);
    check(phase == PH_ERROR, "error after singular inverse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
