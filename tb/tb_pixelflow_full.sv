// tb_pixelflow_full: one complete region through the full-size system.
//
// The top is used with its default parameters: 40 renderer/shader boards of
// 80 EMC/compositor pairs each, 1K-entry FIFOs and the frame-buffer board
// with ten corner turners. Every board renders a different z-buffered
// plane over the whole 160x128 region (z = A x + B y + C, constant colour),
// copies it to its transfer buffer and takes part in one composite transfer,
// board 0 being the master of the ready/go chain. The frame buffer stores the
// result. Each of the 20,480 words written to the ten DRAM banks must be the
// colour of the nearest of the 40 planes at that pixel, worked out here, and
// every pixel must arrive exactly once. Also checks the transfer length at
// the frame buffer (8,192 cycles) and that the whole operation completes.
module tb_pixelflow_full;
  import pf_pkg::*;
  localparam int NB = 40, NCHIP = EMCS_PER_BOARD, NCT = NCHIP / 8;
  localparam logic [2:0] RX = 3'd3, RY = 3'd5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NB-1:0]               gp_we, gp_irq, ring_tx_go, ring_rx_msg, ring_end_msg, ring_clr_msg;
  logic [NB-1:0][1:0]          gp_addr;
  logic [NB-1:0][35:0]         gp_wdata;
  logic [NB-1:0][31:0]         gp_status;
  logic [NB-1:0]               vram_req, vram_ack;
  logic [NB-1:0][VRAM_AW-1:0]  vram_addr;
  logic [NB-1:0][31:0]         vram_data;
  logic [NCHIP-1:0][1:0]       net_head_in, net_tail_out;
  logic                        go_head_in, ready_head_out;
  logic                        fb_ready, fb_store, fb_len_long, fb_swap, fb_front_buf, fb_busy;
  logic [2:0]                  fb_rx, fb_ry;
  logic [NCT-1:0]              dram_we;
  logic [NCT-1:0][17:0]        dram_addr;
  logic [NCT-1:0][31:0]        dram_data;
  logic [NB-1:0]               xfer_ready, xfer_go, xfer_enab, buff_wait, xfer_wait;
  logic [NB-1:0][2:0]          buff_cnt;
  comp_cfg_t [NB-1:0]          board_cfg;

  pixelflow_top dut (.*);

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

  // VRAM of every board: command words only
  logic [31:0] vram [NB][64];
  always @(posedge clk) begin
    for (int i = 0; i < NB; i++) begin
      vram_ack[i]  <= vram_req[i] && !vram_ack[i];
      vram_data[i] <= vram[i][vram_addr[i][5:0]];
    end
  end

  // frame-buffer writes
  logic [31:0] exp_dram [NCT][logic [17:0]];
  int          n_wr [NCT][logic [17:0]];
  int          n_dram = 0, n_fb_enab = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fb.xfer_enab) n_fb_enab++;
    for (int k = 0; k < NCT; k++) if (dram_we[k]) begin
      n_dram++;
      if (!exp_dram[k].exists(dram_addr[k])) check(0, "write at an expected address");
      else begin
        check(dram_data[k] == exp_dram[k][dram_addr[k]], "nearest colour stored");
        n_wr[k][dram_addr[k]]++;
      end
    end
  end

  int pa [NB], pb [NB], pc [NB];
  logic [31:0] pcol [NB];

  task automatic gp_write(input int b, input logic [1:0] a, input logic [35:0] d);
    @(negedge clk);
    gp_we[b] = 1; gp_addr[b] = a; gp_wdata[b] = d;
    @(negedge clk);
    gp_we[b] = 0;
  endtask

  initial begin
    gp_we = '0; gp_addr = '0; gp_wdata = '0; ring_tx_go = '0; ring_rx_msg = '0;
    net_head_in = '1; go_head_in = 0;
    fb_ready = 1; fb_store = 1; fb_len_long = 0; fb_swap = 0; fb_rx = RX; fb_ry = RY;
    for (int b = 0; b < NB; b++) begin
      comp_cfg_t c;
      pa[b] = $urandom_range(0, 2000) - 1000;
      pb[b] = $urandom_range(0, 2000) - 1000;
      pc[b] = $urandom_range(1 << 20, 1 << 24);
      pcol[b] = $urandom;
      // rendering block at word 0
      vram[b][0]  = mk_iword(CLS_RENDER0, EOP_SETENABS, 0, 0, 1'b0, 4'd0);
      vram[b][1]  = mk_iword(CLS_RENDER3, EOP_LOAD, 32, 32, 1'b0, 4'd0);
      vram[b][2]  = pa[b]; vram[b][3] = pb[b]; vram[b][4] = pc[b];
      vram[b][5]  = mk_iword(CLS_RENDER3, EOP_LOAD, 0, 32, 1'b0, 4'd0);
      vram[b][6]  = 0; vram[b][7] = 0; vram[b][8] = pcol[b];
      vram[b][9]  = mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0);
      // transfer block at word 32
      c = '{master: (b == 0), port_write: 1'b0, mode: MODE_COMPOSITE};
      vram[b][32] = mk_iword(CLS_COMP_LEN, EOP_NOP, 0, 0, 1'b0, 4'd0);
      vram[b][33] = mk_iword(CLS_COMP_CONFIG, EOP_NOP, 0, 0, 1'b0, 4'(c));
      vram[b][34] = mk_iword(CLS_REGION_COPY, EOP_NOP, 0, 64, 1'b0, 4'd0);
      vram[b][35] = mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0);
    end
    // expected image: nearest plane per pixel
    for (int x = 0; x < 160; x++)
      for (int y = 0; y < 128; y++) begin
        logic [63:0] best, w;
        logic [9:0] sy;
        best = '1;
        for (int b = 0; b < NB; b++) begin
          w = {32'(pa[b] * x + pb[b] * y + pc[b]), pcol[b]};
          if (w < best) best = w;
        end
        sy = 10'(128 * RY + y);
        exp_dram[x / 16][{1'b1, sy, RX, 4'(x % 16)}] = best[31:0];
      end

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      gp_write(b, 2'd0, {21'd0, 15'd10});
      gp_write(b, 2'd1, {21'd32, 15'd4});
    end
    // wait for the transfer to reach the frame buffer and drain
    while (!dut.u_fb.xfer_enab) @(negedge clk);
    while (fb_busy) @(negedge clk);
    repeat (10) @(negedge clk);
    check(n_fb_enab == XFER_CYC_SHORT, "transfer lasts 8,192 cycles");
    check(n_dram == 160 * 128, "20,480 words stored");
    for (int k = 0; k < NCT; k++)
      foreach (exp_dram[k][a]) check(n_wr[k].exists(a) && n_wr[k][a] == 1, "each pixel stored once");
    for (int b = 0; b < NB; b++)
      check(buff_cnt[b] == 0 && !xfer_ready[b], "board finished its transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
