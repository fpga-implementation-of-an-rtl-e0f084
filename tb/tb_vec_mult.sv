// tb_vec_mult: self-checking test of the pipelined dot-product unit (16 lanes).
// Streams random vector pairs of random length, one per cycle (with gaps),
// and compares each result with a dot product summed exactly in 64-bit
// integers and rounded once (arithmetic shift by 16, saturation). Checks the
// tag order and the latency of $clog2(N) + 2 = 6 cycles.
module tb_vec_mult;
  import atgp_pkg::*;
  localparam int N = 16, LAT = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          calc = 1'b0;
  logic [4:0]    len = '0;
  fx_t           a [N], b [N];
  logic [7:0]    tag = '0, tag_out;
  fx_t           result;
  logic          ready, busy;

  vec_mult #(.N(N), .TAG_W(8)) dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  fx_t    exp_q [$];
  longint t_q [$];
  logic [7:0] tag_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fx_t ref_dot(input int l);
    logic signed [79:0] s = '0;
    for (int k = 0; k < l; k++) s += 80'(longint'(a[k]) * longint'(b[k]));
    s = s >>> 16;
    if (s > 80'sh7fffffff) return fx_t'(32'h7fffffff);
    if (s < -80'sh80000000) return fx_t'(32'h80000000);
    return fx_t'(s);
  endfunction

  always @(posedge clk) if (rst_n && ready) begin
    check(exp_q.size() > 0, "unexpected result");
    if (exp_q.size() > 0) begin
      check(result == exp_q[0], $sformatf("result %0d expected %0d", result, exp_q[0]));
      check(tag_out == tag_q[0], "tag order");
      check(cycles - t_q[0] == LAT, $sformatf("latency %0d", cycles - t_q[0]));
      void'(exp_q.pop_front()); void'(t_q.pop_front()); void'(tag_q.pop_front());
    end
  end

  initial begin
    for (int k = 0; k < N; k++) begin a[k] = '0; b[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      calc = ($urandom_range(0, 3) != 0);
      len  = 5'($urandom_range(0, N));
      tag  = 8'(n);
      for (int k = 0; k < N; k++) begin
        a[k] = (n < 280) ? fx_t'($urandom_range(0, 1 << 20)) - fx_t'(1 << 19)
                         : fx_t'(32'h7fff0000);   // last ones saturate
        b[k] = (n < 280) ? fx_t'($urandom_range(0, 1 << 20)) - fx_t'(1 << 19)
                         : fx_t'(32'h7fff0000);
      end
      if (calc) begin
        exp_q.push_back(ref_dot(int'(len)));
        t_q.push_back(cycles + 1);
        tag_q.push_back(tag);
      end
    end
    @(negedge clk);
    calc = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    check(exp_q.size() == 0, "all results delivered");
    check(!busy, "idle after drain");
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
