// tb_sync_fifo: self-checking test of the bus-side FIFO (depth 4).
// Random pushes and pops against a queue model; checks the show-ahead data,
// the full and empty flags, the occupancy count, and that a push into a full
// FIFO and a pop from an empty one are ignored.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        push = 1'b0, pop = 1'b0;
  logic [15:0] din = '0, dout;
  logic        full, empty;
  logic [2:0]  count;

  sync_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 4), "full flag");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %h expected %h", dout, q[0]));
      push = ($urandom_range(0, 99) < ((n / 100) % 2 ? 30 : 70));
      pop  = ($urandom_range(0, 99) < ((n / 100) % 2 ? 70 : 30));
      din  = 16'($urandom);
      @(posedge clk);
      begin
        bit acc_push;
        acc_push = push && q.size() < 4;
        if (pop && q.size() > 0) void'(q.pop_front());
        if (acc_push) q.push_back(din);
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
