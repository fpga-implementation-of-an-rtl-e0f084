// tb_max_length: self-checking test of the maximum-length unit (8 bands).
// Several searches over random pixels, component pairs fed with random gaps;
// the index of the first pixel of largest squared length, computed here in
// 64-bit integers, must appear when ready rises after the last pixel. One
// search has two equal maxima (the earlier must win).
module tb_max_length;
  import atgp_pkg::*;
  localparam int NB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             clear = 1'b0, new_data = 1'b0, ready;
  logic [3:0]       num_bands = 4'd8;
  logic [IDX_W-1:0] num_pixels = '0, max_index;
  fx_t              data_i = '0, data_j = '0;
  logic [66:0]      max_value;

  max_length #(.N_BANDS(NB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  fx_t pix [40][NB];

  task automatic search(input int r, input int nb, input bit tie);
    longint best_len, l;
    int best;
    best = 0; best_len = -1;
    for (int p = 0; p < r; p++) begin
      l = 0;
      for (int b = 0; b < NB; b++) begin
        pix[p][b] = (b < nb) ? fx_t'($urandom_range(0, 1 << 17)) - fx_t'(1 << 16) : '0;
        if (tie && p == r - 1) pix[p][b] = pix[r/2][b];
        l += longint'(pix[p][b]) * longint'(pix[p][b]);
      end
      if (l > best_len) begin best_len = l; best = p; end
    end
    if (tie) begin      // make pixel r/2 the maximum, with a copy at r-1
      for (int b = 0; b < nb; b++) begin pix[r/2][b] = fx_t'(1 << 17); pix[r-1][b] = fx_t'(1 << 17); end
      best = r / 2;
    end
    @(negedge clk);
    num_bands = 4'(nb); num_pixels = IDX_W'(r); clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int p = 0; p < r; p++)
      for (int b = 0; b < nb; b += 2) begin
        new_data = 1'b0;
        while ($urandom_range(0, 2) == 0) @(negedge clk);
        check(!ready, "ready before the last pixel");
        new_data = 1'b1; data_i = pix[p][b]; data_j = pix[p][b+1];
        @(negedge clk);
      end
    new_data = 1'b0;
    check(ready, "ready after the last pixel");
    check(int'(max_index) == best, $sformatf("index %0d expected %0d", max_index, best));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    search(30, 8, 1'b0);
    search(17, 6, 1'b0);
    search(1, 2, 1'b0);
    search(25, 8, 1'b1);
    for (int s = 0; s < 6; s++) search(int'($urandom_range(2, 40)), 8, 1'b0);
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
