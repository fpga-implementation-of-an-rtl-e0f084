// tb_gj_inverse: self-checking test of the Gauss-Jordan inverse unit (up to
// 8 x 8). For random well-conditioned matrices of every size the rows read
// back must match an inverse computed here in floating point (tolerance
// 2^-9), and the run must end within size^2 + 9*size + 4 cycles. Matrices
// with zero diagonal elements (a scaled cyclic shift plus one more band,
// whose inverse is exact in fixed point) exercise the pivot exchange; matrices with two
// equal rows and the zero matrix must end with singular.
module tb_gj_inverse;
  import atgp_pkg::*;
  localparam int T = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       init = 1'b0, wr_en = 1'b0, start = 1'b0, ready, singular;
  logic [2:0] wr_row = '0, wr_col = '0, rd_row = '0;
  logic [3:0] size = '0;
  fx_t        wr_data = '0;
  fx_t        row_out [T];

  gj_inverse #(.T_MAX(T)) dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;
  int n_swaps = 0;
  always @(posedge clk) if (int'(dut.state) == 1 && dut.piv_zero && dut.piv_found) n_swaps++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real a [T][T];

  // Inverse in floating point with partial pivoting; returns 0 if singular.
  function automatic bit real_inverse(input int n, output real inv [T][T]);
    real m [T][2*T];
    for (int i = 0; i < n; i++)
      for (int j = 0; j < 2 * n; j++)
        m[i][j] = (j < n) ? a[i][j] : ((j - n == i) ? 1.0 : 0.0);
    for (int i = 0; i < n; i++) begin
      int p = i;
      for (int r = i + 1; r < n; r++) if ((m[r][i] < 0 ? -m[r][i] : m[r][i]) > (m[p][i] < 0 ? -m[p][i] : m[p][i])) p = r;
      if (m[p][i] == 0.0) return 0;
      for (int j = 0; j < 2 * n; j++) begin real t = m[i][j]; m[i][j] = m[p][j]; m[p][j] = t; end
      for (int r = 0; r < n; r++) if (r != i) begin
        real f = m[r][i] / m[i][i];
        for (int j = 0; j < 2 * n; j++) m[r][j] -= f * m[i][j];
      end
    end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) inv[i][j] = m[i][j + n] / m[i][i];
    return 1;
  endfunction

  task automatic run(input int n, input bit expect_singular);
    real inv [T][T];
    longint t0;
    bit ok;
    @(negedge clk);
    init = 1'b1;
    @(negedge clk);
    init = 1'b0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        wr_en = 1'b1; wr_row = 3'(i); wr_col = 3'(j);
        wr_data = fx_t'($rtoi(a[i][j] * 65536.0));
        @(negedge clk);
      end
    wr_en = 1'b0;
    size = 4'(n); start = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    while (!ready && !singular && cycles - t0 < 1000) @(negedge clk);
    if (expect_singular) begin
      check(singular && !ready, $sformatf("size %0d: singular expected", n));
      return;
    end
    check(ready && !singular, $sformatf("size %0d: ready expected", n));
    check(cycles - t0 <= n * n + 9 * n + 4, $sformatf("size %0d took %0d cycles", n, cycles - t0));
    ok = real_inverse(n, inv);
    for (int i = 0; i < n; i++) begin
      rd_row = 3'(i);
      #1;
      for (int j = 0; j < n; j++) begin
        real got = real'(row_out[j]) / 65536.0;
        real d = got - inv[i][j];
        check(d < 0.002 && d > -0.002, $sformatf("size %0d inv[%0d][%0d]=%f expected %f", n, i, j, got, inv[i][j]));
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int n = 1; n <= T; n++) begin
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++)
            a[i][j] = (i == j ? real'(n) + 1.0 : 0.0) + real'($urandom_range(0, 2000)) / 1000.0 - 1.0;
        run(n, 1'b0);
      end
    // zero leading elements: needs row exchanges
    for (int n = 2; n <= T; n++) begin
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          a[i][j] = (j == (i + 1) % n) ? 2.0 : ((j == (i + 2) % n && i + 2 < n) ? 0.5 : 0.0);
      run(n, 1'b0);
    end
    check(n_swaps > 0, "pivot exchange happened");
    // singular: two equal rows, and the zero matrix
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        a[i][j] = (i == j ? 2.0 : 0.5);
    for (int j = 0; j < 5; j++) a[3][j] = a[1][j];
    run(5, 1'b1);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) a[i][j] = 0.0;
    run(3, 1'b1);
    $display("pivot exchanges: %0d", n_swaps);
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
