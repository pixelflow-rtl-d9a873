// tb_corner_turner: one corner turner fed with a whole region transfer.
//
// Sixteen pixel streams (eight compositor chips, two wires each) carry 128
// random pixel words each, high bit first, as 2-bit pairs at 40 MHz. The
// expected DRAM contents are worked out here: pixel 2j+w of the EMC on chip
// c lies at tile row c, so it goes to y = 128*ry + 16*c + (2j+w)/16, column
// (2j+w)%16 of region column rx, and its word is the pixel's low 32 bits.
// Checks every written word and address, that each of the 2,048 pixels is
// written exactly once, that writes are at least 4 cycles apart (20 MHz) for
// 64-bit pixels and 8 apart for 128-bit ones, and that an unstored transfer
// writes nothing. Runs 64-bit, 128-bit and unstored transfers.
module tb_corner_turner;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic len_long, store, back_buf, pair_valid, dram_we;
  logic [2:0] rx, ry;
  logic [7:0][1:0][1:0] pair;
  logic [17:0] dram_addr;
  logic [31:0] dram_data;

  corner_turner dut (.*);

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

  logic [127:0] pix [16][128];
  logic [31:0]  exp_mem [logic [17:0]];
  int           n_written [logic [17:0]];
  int           n_we, last_we, min_gap;
  longint       cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && dram_we) begin
    n_we++;
    if (last_we >= 0 && cyc - last_we < min_gap) min_gap = int'(cyc - last_we);
    last_we = int'(cyc);
    if (!exp_mem.exists(dram_addr)) check(0, "write to an expected address");
    else begin
      check(dram_data == exp_mem[dram_addr], "pixel word");
      n_written[dram_addr]++;
    end
  end

  task automatic transfer(input bit lng, input bit st);
    int L;
    L = lng ? 128 : 64;
    exp_mem.delete(); n_written.delete();
    n_we = 0; last_we = -1; min_gap = 1000;
    @(negedge clk);
    len_long = lng; store = st; back_buf = $urandom_range(0, 1);
    rx = $urandom_range(0, 7); ry = $urandom_range(0, 7);
    for (int s = 0; s < 16; s++)
      for (int j = 0; j < 128; j++) begin
        logic [7:0] p;
        logic [9:0] y;
        pix[s][j] = {$urandom, $urandom, $urandom, $urandom};
        if (!lng) pix[s][j][127:64] = '0;
        p = 8'(2 * j + s % 2);
        y = 10'(128 * ry + 16 * (s / 2) + p / 16);
        exp_mem[{back_buf, y, rx, p[3:0]}] = pix[s][j][31:0];
      end
    for (int j = 0; j < 128; j++)
      for (int b = 0; b < L; b += 2) begin
        @(negedge clk);
        pair_valid = 0;
        @(negedge clk);
        pair_valid = 1;
        for (int s = 0; s < 16; s++)
          pair[s / 2][s % 2] = {pix[s][j][L-1-b], pix[s][j][L-2-b]};
      end
    @(negedge clk); pair_valid = 0;
    repeat (200) @(negedge clk);
    if (st) begin
      check(n_we == 2048, "2,048 words written");
      foreach (exp_mem[a]) check(n_written.exists(a) && n_written[a] == 1, "each pixel written once");
      check(min_gap == (lng ? 8 : 4), "one word per 4 (8) cycles");
    end else begin
      check(n_we == 0, "nothing written when the transfer is not stored");
    end
  endtask

  initial begin
    len_long = 0; store = 0; back_buf = 0; rx = 0; ry = 0; pair_valid = 0; pair = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    transfer(1'b0, 1'b1);
    transfer(1'b1, 1'b1);
    transfer(1'b0, 1'b0);
    transfer(1'b0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
