// tb_matrix_mem: self-checking test of the row-readable matrix memory (8 x 4).
// Writes every element in random order, then random overwrites, checking
// both row-read ports against a model array after each write.
module tb_matrix_mem;
  import atgp_pkg::*;
  localparam int R = 8, C = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       we = 1'b0;
  logic [2:0] wr_row = '0, rd_row_a = '0, rd_row_b = '0;
  logic [1:0] wr_col = '0;
  fx_t        wr_data = '0;
  fx_t        row_a [C], row_b [C];

  matrix_mem #(.ROWS(R), .COLS(C)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  fx_t m [R][C];

  initial begin
    for (int n = 0; n < 200; n++) begin
      int r, c;
      r = (n < R * C) ? n % R : $urandom_range(0, R - 1);
      c = (n < R * C) ? n / R : $urandom_range(0, C - 1);
      @(negedge clk);
      we = 1'b1; wr_row = 3'(r); wr_col = 2'(c); wr_data = fx_t'($urandom);
      m[r][c] = wr_data;
      @(negedge clk);
      we = 1'b0;
      if (n >= R * C - 1) begin
        rd_row_a = 3'($urandom); rd_row_b = 3'($urandom);
        #1;
        for (int k = 0; k < C; k++) begin
          check(row_a[k] == m[rd_row_a][k], "port a");
          check(row_b[k] == m[rd_row_b][k], "port b");
        end
      end
    end
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
