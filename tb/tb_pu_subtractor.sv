// tb_pu_subtractor: self-checking test of the P_U subtractor.
// Random elements at random positions (a third of them on the diagonal):
// the output must be 1 - a on the diagonal and -a elsewhere, one cycle later,
// with the position passed along.
module tb_pu_subtractor;
  import atgp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       new_data = 1'b0;
  fx_t        data = '0, result;
  logic [7:0] row = '0, col = '0, row_out, col_out;
  logic       ready;

  pu_subtractor #(.POS_W(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fx_t a, expv;
    logic [7:0] r, c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      a = fx_t'($urandom_range(0, 1 << 18)) - fx_t'(1 << 17);
      r = 8'($urandom);
      c = (n % 3 == 0) ? r : 8'($urandom);
      expv = (r == c) ? (fx_t'(65536) - a) : -a;
      @(negedge clk);
      new_data = 1'b1; data = a; row = r; col = c;
      @(negedge clk);
      new_data = 1'b0;
      check(ready, "ready one cycle after new_data");
      check(result == expv, $sformatf("(%0d,%0d) a=%0d got %0d exp %0d", r, c, a, result, expv));
      check(row_out == r && col_out == c, "position");
      @(negedge clk);
      check(!ready, "ready is a single pulse");
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
