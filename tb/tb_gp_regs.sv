// tb_gp_regs: graphics-processor status and command registers.
// Checks that the timer advances once every four 80 MHz cycles (50 ns) from
// reset, that it wraps after 65,536 counts and sets the sticky overflow bit,
// that message and TxGo events set sticky bits which hold until cleared by a
// write-one command, that irq follows the message and timer bits, that the
// FIFO flags appear in the status word, and that the end-of-message and
// message-processed commands give one-cycle pulses.
module tb_gp_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_we, end_msg, clr_msg, irq;
  logic [31:0] cmd_data, status;
  logic rfifo_full, tfifo_full, rfifo_empty, tfifo_empty, tx_go, rx_msg;

  gp_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;        // cycles since reset was released
  always @(posedge clk) if (rst_n) cyc++;

  int n_end = 0, n_clr = 0;
  always @(posedge clk) if (rst_n) begin
    if (end_msg) n_end++;
    if (clr_msg) n_clr++;
  end

  task automatic write_cmd(input logic [31:0] d);
    @(negedge clk); cmd_we = 1; cmd_data = d;
    @(negedge clk); cmd_we = 0; cmd_data = 0;
  endtask

  initial begin
    cmd_we = 0; cmd_data = 0; tx_go = 0; rx_msg = 0;
    rfifo_full = 0; tfifo_full = 0; rfifo_empty = 1; tfifo_empty = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // timer rate
    for (int i = 0; i < 200; i++) begin
      repeat ($urandom_range(1, 37)) @(negedge clk);
      check(status[31:16] == 16'(cyc / 4), "timer counts every 50 ns");
    end
    // FIFO flags
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      {rfifo_full, tfifo_full, rfifo_empty, tfifo_empty} = 4'(i);
      #1;
      check(status[3:0] == {tfifo_empty, rfifo_empty, ~tfifo_full, ~rfifo_full}, "FIFO flags");
    end
    // sticky bits
    check(status[6:4] == 0 && !irq, "no events yet");
    @(negedge clk) tx_go = 1; @(negedge clk) tx_go = 0;
    repeat (5) @(negedge clk);
    check(status[4] && !irq, "TxGo sticky, no interrupt");
    @(negedge clk) rx_msg = 1; @(negedge clk) rx_msg = 0;
    repeat (5) @(negedge clk);
    check(status[5] && irq, "message sticky, interrupt");
    write_cmd(32'h10);
    check(!status[4] && status[5], "write-one clears TxGo only");
    write_cmd(32'h20);
    check(!status[5] && !irq, "write-one clears message bit");
    // pulses
    write_cmd(32'h100);
    write_cmd(32'h200);
    write_cmd(32'h300);
    repeat (2) @(negedge clk);
    check(n_end == 2 && n_clr == 2, "one pulse per command");
    // overflow
    while (cyc < 4 * 65536 - 2) @(negedge clk);
    check(!status[6], "no overflow before the wrap");
    repeat (4) @(negedge clk);
    check(status[6] && irq, "overflow sets the sticky bit and interrupts");
    check(status[31:16] == 16'(cyc / 4), "timer wraps to zero");
    write_cmd(32'h40);
    check(!status[6] && !irq, "overflow cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
