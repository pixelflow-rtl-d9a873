// tb_fb_board: the frame-buffer board receiving whole region transfers.
//
// Plays the last compositor board: raises go (registered, as a board does)
// and, START_DLY + 3 cycles later, drives transfer cycle c on every wire pair
// with the same registered timing a compositor chip has (wire w of chip e
// carries bit L-1-b of pixel 2j+w at cycle c = j*L + b). Pixels are random
// 64- or 128-bit words. Expected DRAM contents are worked out here from the
// tile layout (chip e = tile column e/8, row e%8; corner turner k serves tile
// column k). Checks every DRAM write (address, data, bank), that every pixel
// of the region is written once, that nothing is written for an unstored
// region, that the wires are forwarded with one cycle of delay, that
// ReadyOut is low during a transfer and while the corner turners drain and
// high otherwise when the controller is ready, and that swap flips the
// written buffer. Uses NCHIP = 16 (two banks) to stay short.
module tb_fb_board;
  import pf_pkg::*;
  localparam int NCHIP = 16, NCT = NCHIP / 8, SD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCHIP-1:0][1:0] net_in, net_out;
  logic ready_out, go_in, fb_ready, store, len_long, swap, front_buf, busy;
  logic [2:0] rx, ry;
  logic [NCT-1:0] dram_we;
  logic [NCT-1:0][17:0] dram_addr;
  logic [NCT-1:0][31:0] dram_data;

  fb_board #(.NCHIP(NCHIP), .START_DLY(SD)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] pix [NCHIP][256];
  logic [31:0]  exp_mem [NCT][logic [17:0]];
  int           n_wr [NCT][logic [17:0]];
  int           n_we;
  bit           in_xfer;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NCT; k++) if (dram_we[k]) begin
      n_we++;
      if (!exp_mem[k].exists(dram_addr[k])) check(0, "write to an expected address");
      else begin
        check(dram_data[k] == exp_mem[k][dram_addr[k]], "pixel word in its bank");
        n_wr[k][dram_addr[k]]++;
      end
    end
  end

  // forwarding and ReadyOut
  int n_ready_hi = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    // net_in changes only at falling edges: it still holds the sampled value
    check(net_out == net_in, "wires forwarded after one cycle");
    if (in_xfer) check(!ready_out, "not ready during a transfer");
    if (ready_out) n_ready_hi++;
  end

  task automatic region(input bit lng, input bit st, input bit do_swap);
    int L;
    logic bb;
    L = lng ? 128 : 64;
    if (do_swap) begin @(negedge clk) swap = 1; @(negedge clk) swap = 0; end
    bb = ~front_buf;
    for (int k = 0; k < NCT; k++) begin exp_mem[k].delete(); n_wr[k].delete(); end
    n_we = 0;
    @(negedge clk);
    len_long = lng; store = st; rx = $urandom_range(0, 7); ry = $urandom_range(0, 7);
    for (int e = 0; e < NCHIP; e++)
      for (int p = 0; p < 256; p++) begin
        logic [9:0] y;
        pix[e][p] = {$urandom, $urandom, $urandom, $urandom};
        y = 10'(128 * ry + 16 * (e % 8) + p / 16);
        exp_mem[e / 8][{bb, y, rx, 4'(p % 16)}] = pix[e][p][31:0];
      end
    while (!ready_out) @(negedge clk);
    in_xfer = 1;
    go_in = 1;                                   // seen at the next edge, T
    repeat (SD + 2) @(negedge clk);              // cycle 0 sampled at edge T+SD+2
    for (int c = 0; c < 128 * L; c++) begin
      int j, b;
      j = c / L; b = c % L;
      for (int e = 0; e < NCHIP; e++)
        for (int w = 0; w < 2; w++) net_in[e][w] = pix[e][2*j+w][L-1-b];
      @(negedge clk);
    end
    net_in = '0;
    go_in = 0;
    repeat (4) @(negedge clk);
    in_xfer = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    if (st) begin
      check(n_we == NCHIP * 256, "every pixel written");
      for (int k = 0; k < NCT; k++)
        foreach (exp_mem[k][a]) check(n_wr[k].exists(a) && n_wr[k][a] == 1, "written once");
    end else check(n_we == 0, "unstored region not written");
    repeat (3) @(negedge clk);
    check(ready_out, "ready again after the drain");
  endtask

  initial begin
    net_in = '0; go_in = 0; fb_ready = 1; store = 1; len_long = 0; swap = 0; rx = 0; ry = 0;
    in_xfer = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    region(1'b0, 1'b1, 1'b0);
    region(1'b1, 1'b1, 1'b1);
    region(1'b0, 1'b0, 1'b0);
    region(1'b0, 1'b1, 1'b1);
    // controller not ready: ReadyOut must stay low
    @(negedge clk) fb_ready = 0;
    repeat (3) @(negedge clk);
    check(!ready_out, "ReadyOut follows the controller");
    check(n_ready_hi > 0, "ReadyOut was raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
