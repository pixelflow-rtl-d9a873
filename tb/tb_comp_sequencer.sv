// tb_comp_sequencer: checks the compositor sequencer's register and timer.
// The configuration and length registers must take what the IGC writes.
// After XferGo rises, XferEnab must rise after START_DLY cycles and stay high
// for exactly 8,192 cycles with 64-bit pixels and 16,384 with 128-bit pixels,
// with `cnt` counting 0, 1, 2, ..., `pix_start` every 64 or 128 cycles and
// `done` one cycle after the last transfer cycle. A second rising edge of
// XferGo is needed for a second transfer.
module tb_comp_sequencer;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int unsigned DLY = 3;
  logic cfg_we, len_we, len_long_in, xfer_go;
  comp_cfg_t cfg_in, cfg;
  logic len_long, xfer_enab, phase, pix_start, done;
  logic [13:0] cnt;

  comp_sequencer #(.START_DLY(DLY)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic lng);
    int go_t, first, len, n_ps, n_done, expect_len;
    expect_len = lng ? 16384 : 8192;
    @(negedge clk);
    len_we = 1; len_long_in = lng;
    @(negedge clk);
    len_we = 0;
    check(len_long == lng, "length register");
    xfer_go = 1;
    first = -1; len = 0; n_ps = 0; n_done = 0;
    for (int c = 0; c < expect_len + 50; c++) begin
      @(posedge clk); #1;
      if (xfer_enab) begin
        if (first < 0) first = c;
        if (cnt != 14'(len)) begin
          checks++; failures++;
          if (failures < 10) $display("cnt %0d expected %0d", cnt, len);
        end
        if (pix_start) n_ps++;
        len++;
      end
      if (done) begin
        n_done++;
        check(!xfer_enab && len == expect_len, "done right after the last cycle");
      end
    end
    check(first == int'(DLY), "startup delay");
    check(len == expect_len, "XferEnab length");
    check(n_ps == 128, "128 pixel pairs");
    check(n_done == 1, "one done pulse");
    // XferGo still high: no second transfer
    repeat (100) @(posedge clk);
    #1 check(!xfer_enab, "one transfer per rising edge");
    xfer_go = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    cfg_we = 0; len_we = 0; len_long_in = 0; xfer_go = 0; cfg_in = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(cfg.mode == MODE_IDLE, "reset mode");
    cfg_in = '{master: 1'b1, port_write: 1'b1, mode: MODE_LOAD_FWD};
    cfg_we = 1;
    @(negedge clk); cfg_we = 0;
    check(cfg.mode == MODE_LOAD_FWD && cfg.master && cfg.port_write, "config register");
    run(1'b0);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
