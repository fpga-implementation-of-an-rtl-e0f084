// tb_pixel_fifo: self-checking test of the pixel FIFO (8 bands, 4 pixels deep).
// Pixels of 6 bands are written two components at a time and read whole, with
// random pacing on both sides against a queue model. Checks the data bus
// (unused bands read as zero), full and empty, that a pixel is readable only
// once its last pair is written, and that pairs offered when full are dropped.
module tb_pixel_fifo;
  import atgp_pkg::*;
  localparam int NB = 8, D = 4, USE = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] num_bands = 4'(USE);
  logic       new_data = 1'b0, read = 1'b0, full, empty;
  fx_t        data_i = '0, data_j = '0;
  fx_t        data_bus [NB];

  pixel_fifo #(.N_BANDS(NB), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef fx_t pix_t [NB];
  pix_t q [$];
  int n_full = 0;

  initial begin
    pix_t cur;
    int wb = 0, sent = 0, got = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) cur[b] = (b < USE) ? fx_t'($urandom) : '0;
    for (int n = 0; n < 3000 && got < 60; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D), "full flag");
      if (q.size() > 0)
        for (int b = 0; b < NB; b++)
          check(data_bus[b] == q[0][b], $sformatf("pixel %0d band %0d", got, b));
      if (full) n_full++;
      read     = ($urandom_range(0, 99) < ((n / 300) % 2 ? 60 : 10));
      new_data = (sent < 60) && ($urandom_range(0, 99) < 80);
      data_i   = cur[wb];
      data_j   = cur[wb+1];
      @(posedge clk);
      if (read && q.size() > 0) begin void'(q.pop_front()); got++; end
      if (new_data && !(full && wb == 0)) begin
        if (wb + 2 == USE) begin
          q.push_back(cur);
          sent++;
          wb = 0;
          for (int b = 0; b < NB; b++) cur[b] = (b < USE) ? fx_t'($urandom) : '0;
        end else wb += 2;
      end
    end
    check(got == 60, $sformatf("pixels read %0d", got));
    check(n_full > 0, "FIFO became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
