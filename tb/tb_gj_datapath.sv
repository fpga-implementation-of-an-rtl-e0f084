// tb_gj_datapath: self-checking test of the Gauss-Jordan row data path
// (4 lanes). Loads random pivot rows, then checks elimination with the own
// ratio a_ji/a_ii, elimination with an external factor, and scaling, against
// values computed here with exact integer arithmetic (64-bit products,
// shifts, truncating division), including the one-cycle latency and the tag.
module tb_gj_datapath;
  import atgp_pkg::*;
  localparam int T = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load = 1'b0, calc = 1'b0, scale = 1'b0, use_ext = 1'b0, ready;
  fx_t        pivot_in [T], row_in [T], new_row [T];
  fx_t        a_ii_in = '0, ext_factor = '0, a_ji = '0, ratio, recip;
  logic [1:0] tag_in = '0, tag_out;

  gj_datapath #(.T_MAX(T), .TAG_W(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fx_t rnd(input int range);
    return fx_t'($urandom_range(0, 2 * range)) - fx_t'(range);
  endfunction

  function automatic fx_t mulr(input fx_t x, input fx_t y);
    return fx_t'((longint'(x) * longint'(y)) >>> 16);
  endfunction

  initial begin
    fx_t piv [T], aii, f, exp_ratio, exp_recip;
    for (int k = 0; k < T; k++) begin pivot_in[k] = '0; row_in[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 150; n++) begin
      for (int k = 0; k < T; k++) piv[k] = rnd(1 << 18);
      aii = rnd(1 << 18);
      if (aii < fx_t'(1 << 14) && aii > -fx_t'(1 << 14)) aii = aii + fx_t'(1 << 15);
      @(negedge clk);
      load = 1'b1; pivot_in = piv; a_ii_in = aii;
      @(negedge clk);
      load = 1'b0;
      for (int mode = 0; mode < 3; mode++) begin
        calc = 1'b1; scale = (mode == 2); use_ext = (mode == 1);
        a_ji = rnd(1 << 18); ext_factor = rnd(1 << 17);
        tag_in = 2'($urandom);
        for (int k = 0; k < T; k++) row_in[k] = rnd(1 << 18);
        exp_ratio = fx_t'((longint'(a_ji) <<< 16) / longint'(aii));
        exp_recip = fx_t'((longint'(1) <<< 32) / longint'(aii));
        #1;
        check(ratio == exp_ratio, $sformatf("ratio %0d expected %0d", ratio, exp_ratio));
        check(recip == exp_recip, $sformatf("recip %0d expected %0d", recip, exp_recip));
        f = (mode == 1) ? ext_factor : (mode == 2 ? exp_recip : exp_ratio);
        @(negedge clk);
        calc = 1'b0;
        check(ready, "ready after calc");
        check(tag_out == tag_in, "tag");
        for (int k = 0; k < T; k++) begin
          fx_t e;
          e = (mode == 2) ? mulr(row_in[k], f) : row_in[k] - mulr(piv[k], f);
          check(new_row[k] == e, $sformatf("mode %0d lane %0d: %0d expected %0d", mode, k, new_row[k], e));
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
