// tb_sync_fifo: the 1K x 36 command FIFO against a queue model.
// Random pushes and pops, then a fill to exactly 1024 entries (full must rise
// there and not before), a drain in order, and checks of empty and count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, pop, empty, full;
  logic [35:0] din, dout;
  logic [10:0] count;

  sync_fifo #(.WIDTH(36), .DEPTH(1024)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [35:0] q [$];

  task automatic step(input bit do_push, input bit do_pop);
    @(negedge clk);
    push = do_push && !full;
    pop  = do_pop && !empty;
    din  = {$urandom, 4'($urandom)};
    if (pop) begin
      check(q.size() > 0 && dout == q[0], "head matches model");
      void'(q.pop_front());
    end
    if (push) q.push_back(din);
    @(posedge clk); #1;
    push = 0; pop = 0;
    check(count == 11'(q.size()), "count");
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == 1024), "full");
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45);
    while (!full) step(1, 0);
    check(q.size() == 1024, "full at 1024 entries");
    while (!empty) step(0, 1);
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
