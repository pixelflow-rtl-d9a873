// tb_fb_demux: the frame-buffer input demultiplexer for one wire pair.
// Random transfers (phase alternating from 0) separated by idle gaps, random
// wire data. Checks every cycle that the wires are forwarded with one cycle
// of delay, that a pair is flagged exactly one cycle after each low-phase bit
// during a transfer, and that each pair is {high bit, low bit} of its wire.
module tb_fb_demux;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic xfer_enab, phase, pair_valid;
  logic [1:0] net_in, net_out;
  logic [1:0][1:0] pair;

  fb_demux dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] prev_in, hi;
  logic prev_en, prev_ph;
  int n_pairs = 0;
  initial begin
    xfer_enab = 0; phase = 0; net_in = 0; hi = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int burst = 0; burst < 40; burst++) begin
      int n;
      n = 2 * $urandom_range(1, 200);
      for (int c = 0; c < n + $urandom_range(0, 30); c++) begin
        @(negedge clk);
        xfer_enab = (c < n); phase = c[0];
        net_in = 2'($urandom);
        prev_in = net_in; prev_en = xfer_enab; prev_ph = phase;
        if (xfer_enab && !phase) hi = net_in;
        @(posedge clk); #1;
        check(net_out == prev_in, "wires forwarded after one cycle");
        check(pair_valid == (prev_en && prev_ph), "pair flagged after the low bit");
        if (prev_en && prev_ph) begin
          n_pairs++;
          for (int w = 0; w < 2; w++)
            check(pair[w] == {hi[w], prev_in[w]}, "pair = {high, low}");
        end
      end
    end
    check(n_pairs > 100, "pairs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
