// tb_pixelflow_top: end-to-end run of a small PixelFlow system.
//
// Two renderers (boards 0 and 1, board 0 the master of the ready/go chain)
// and one shader (board 2) in front of the frame buffer, each board with 8
// EMC/compositor pairs (one 16x128 column of tiles) and 16-entry FIFOs. The
// testbench plays each board's graphics processor and VRAM: it writes the
// command blocks into VRAM, pushes their control words into the RFIFO and
// TFIFO over the local bus, and answers VRAM reads. It also plays the frame
// buffer's controller (store this transfer or not, where, when to swap).
//
// Rendering recipe, for each of NREG regions:
//   transfer 2r   (load):   renderers render the region (two overlapping
//                 z-buffered planes each), copy it to the transfer buffer
//                 and composite; the shader loads the merged stream.
//   transfer 2r+1 (burp):   renderers take part without data; the shader
//                 copies the region in, shades it (adds a constant to the
//                 colour), copies it back and unloads it to the frame
//                 buffer, which stores it at region (rx, ry).
// Every word the frame buffer writes is checked against the colour of the
// nearer of the two renderers' pixels plus the shading constant, worked out
// here from the plane equations; every pixel of every region must arrive.
// Counted, and a failure if never seen: BuffWait stalls, pre-emption of an
// RFIFO block by transfer commands, burp transfers, load transfers, unload
// transfers, compositor mode switches, the master waiting on the ready
// chain, transfer commands held back by XferWait, and a buffer swap.
module tb_pixelflow_top;
  import pf_pkg::*;
  localparam int NB = 3, NCHIP = 8, NCT = NCHIP / 8, NREG = 3;
  localparam int SHADER = NB - 1;
  localparam logic [31:0] SHADE_K = 32'h0001_0203;

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

  pixelflow_top #(.NUM_BOARDS(NB), .NCHIP(NCHIP), .FIFO_DEPTH(16), .START_DLY(2)) dut (.*);

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

  // ----------------------------------------------------------- VRAM models
  logic [31:0] vram [NB][4096];
  always @(posedge clk) begin
    for (int i = 0; i < NB; i++) begin
      vram_ack[i] <= vram_req[i] && !vram_ack[i];
      vram_data[i] <= vram[i][vram_addr[i][11:0]];
    end
  end

  // ------------------------------------------------------ command building
  int rp [NB];                          // next free RFIFO-area word
  int tp [NB];                          // next free TFIFO-area word
  ctrl_word_t tblocks [NB][$];

  function automatic void put_r(input int b, input logic [31:0] w);
    vram[b][rp[b]] = w; rp[b]++;
  endfunction
  function automatic void put_t(input int b, input logic [31:0] w);
    vram[b][tp[b]] = w; tp[b]++;
  endfunction
  function automatic void r3(input int b, input emc_op_e op, input int addr, input int len,
                             input int a, input int bb, input int c, input bit to_t = 0);
    logic [31:0] w [4];
    w[0] = mk_iword(CLS_RENDER3, op, addr, len, 1'b0, 4'd0);
    w[1] = a; w[2] = bb; w[3] = c;
    for (int i = 0; i < 4; i++) if (to_t) put_t(b, w[i]); else put_r(b, w[i]);
  endfunction
  function automatic void r0(input int b, input emc_op_e op, input bit to_t = 0);
    if (to_t) put_t(b, mk_iword(CLS_RENDER0, op, 0, 0, 1'b0, 4'd0));
    else      put_r(b, mk_iword(CLS_RENDER0, op, 0, 0, 1'b0, 4'd0));
  endfunction
  function automatic logic [31:0] cfgw(input bit master, input bit pw, input comp_mode_e m);
    comp_cfg_t c;
    c = '{master: master, port_write: pw, mode: m};
    return mk_iword(CLS_COMP_CONFIG, EOP_NOP, 0, 0, 1'b0, 4'(c));
  endfunction
  // open / close a TFIFO block
  int tstart [NB];
  function automatic void t_open(input int b);
    tstart[b] = tp[b];
  endfunction
  function automatic void t_close(input int b);
    tblocks[b].push_back('{addr: 21'(tstart[b]), len: 15'(tp[b] - tstart[b])});
  endfunction

  // ----------------------------------------------------- expected images
  // renderer planes per region: z = A x + B y + C, colour constant
  int za [NB][NREG][2], zb [NB][NREG][2], zc [NB][NREG][2];
  logic [31:0] col [NB][NREG][2];
  int ea [NREG], eb [NREG], ec [NREG];          // edge of the second plane
  logic [63:0] exp_word [NREG][16][128];

  function automatic logic [63:0] render_word(input int b, input int r, input int x, input int y);
    logic [31:0] z, c;
    int z2;
    z = 32'(za[b][r][0] * x + zb[b][r][0] * y + zc[b][r][0]);
    c = col[b][r][0];
    z2 = za[b][r][1] * x + zb[b][r][1] * y + zc[b][r][1];
    if (ea[r] * x + eb[r] * y + ec[r] >= 0 && z2 < int'(z)) begin
      z = 32'(z2);
      c = col[b][r][1];
    end
    return {z, c};
  endfunction

  // --------------------------------------------------- frame-buffer checks
  int n_dram = 0, n_bad = 0;
  int n_written [logic [17:0]];
  logic [31:0] exp_dram [logic [17:0]];
  always @(posedge clk) if (rst_n && dram_we[0]) begin
    n_dram++;
    if (!exp_dram.exists(dram_addr[0])) begin
      check(0, "frame-buffer write at an expected address");
    end else begin
      check(dram_data[0] == exp_dram[dram_addr[0]], "shaded pixel in the frame buffer");
      if (dram_data[0] != exp_dram[dram_addr[0]] && n_bad++ < 4)
        $display("  addr %h got %h exp %h transfer %0d", dram_addr[0], dram_data[0], exp_dram[dram_addr[0]], n_xfer);
      n_written[dram_addr[0]]++;
    end
  end

  // ------------------------------------------------------ mechanism counts
  int n_buffwait = 0, n_preempt = 0, n_burp = 0, n_load = 0, n_unload = 0;
  int n_mode_switch = 0, n_ready_wait = 0, n_xferwait_hold = 0, n_swap = 0, n_xfer = 0;
  logic [NB-1:0] bw_q = '0;
  comp_cfg_t [NB-1:0] cfg_q = '0;
  logic go_fb_q = 1'b0, front_q = 1'b0;
  logic [NB-1:0] pre_now;
  logic [NB-1:0] hold_now;
  assign pre_now[0] = dut.g_board[0].u_board.cmd_valid && dut.g_board[0].u_board.u_parser.from_tfifo &&
                      dut.g_board[0].u_board.u_parser.r_left_q != 0;
  assign pre_now[1] = dut.g_board[1].u_board.cmd_valid && dut.g_board[1].u_board.u_parser.from_tfifo &&
                      dut.g_board[1].u_board.u_parser.r_left_q != 0;
  assign pre_now[2] = dut.g_board[2].u_board.cmd_valid && dut.g_board[2].u_board.u_parser.from_tfifo &&
                      dut.g_board[2].u_board.u_parser.r_left_q != 0;
  assign hold_now[0] = xfer_wait[0] && dut.g_board[0].u_board.u_parser.t_avail;
  assign hold_now[1] = xfer_wait[1] && dut.g_board[1].u_board.u_parser.t_avail;
  assign hold_now[2] = xfer_wait[2] && dut.g_board[2].u_board.u_parser.t_avail;
  always @(posedge clk) if (rst_n) begin
    bw_q  <= buff_wait;
    cfg_q <= board_cfg;
    go_fb_q <= dut.go[NB];
    front_q <= fb_front_buf;
    for (int i = 0; i < NB; i++) begin
      if (buff_wait[i] && !bw_q[i]) n_buffwait++;
      if (board_cfg[i].mode != cfg_q[i].mode) n_mode_switch++;
      if (pre_now[i]) n_preempt++;
      if (hold_now[i]) n_xferwait_hold++;
    end
    if (xfer_ready[0] && board_cfg[0].master && !dut.ready[1]) n_ready_wait++;
    if (fb_front_buf != front_q) n_swap++;
    if (dut.go[NB] && !go_fb_q) begin
      n_xfer++;
      if (board_cfg[SHADER].mode == MODE_UNLOAD) begin n_unload++; n_burp++; end
      if (board_cfg[SHADER].mode == MODE_LOAD_FWD && board_cfg[SHADER].port_write) n_load++;
    end
  end

  // frame-buffer controller: each transfer's recipe entry, set up while the
  // previous one runs (go reaches the frame buffer last)
  int fb_n = 0;
  always @(posedge clk) if (rst_n && !dut.go[NB] && go_fb_q) fb_n++;
  always_comb begin
    fb_store = fb_n[0];                       // odd transfers carry shaded regions
    fb_rx    = 3'(fb_n / 2 + 1);
    fb_ry    = 3'(fb_n / 2 + 2);
  end

  // --------------------------------------------------------------- program
  task automatic gp_write(input int b, input logic [1:0] a, input logic [35:0] d);
    @(negedge clk);
    gp_we[b] = 1; gp_addr[b] = a; gp_wdata[b] = d;
    @(negedge clk);
    gp_we[b] = 0;
  endtask

  initial begin
    int buf_i;
    gp_we = '0; gp_addr = '0; gp_wdata = '0; ring_tx_go = '0; ring_rx_msg = '0;
    net_head_in = '1;                 // farthest possible pixels enter the head
    go_head_in = 0; fb_ready = 1; fb_len_long = 0; fb_swap = 0;
    for (int b = 0; b < NB; b++) begin rp[b] = 16; tp[b] = 2048; end

    // ---- renderers
    for (int r = 0; r < NREG; r++) begin
      ea[r] = 1; eb[r] = -1; ec[r] = 8 * r;          // x - y + 8r >= 0
      for (int b = 0; b < 2; b++)
        for (int k = 0; k < 2; k++) begin
          za[b][r][k] = $urandom_range(0, 50) * 1000;
          zb[b][r][k] = $urandom_range(0, 2000);
          zc[b][r][k] = $urandom_range(0, 1 << 20);
          col[b][r][k] = $urandom;
        end
    end
    for (int b = 0; b < 2; b++) begin
      buf_i = 0;
      t_open(b);
      put_t(b, mk_iword(CLS_COMP_LEN, EOP_NOP, 0, 0, 1'b0, 4'd0));
      t_close(b);
      for (int r = 0; r < NREG; r++) begin
        int base;
        // region r into buffer buf_i
        base = 64 * (buf_i % MAX_BUFFS);
        r0(b, EOP_SETENABS);
        r3(b, EOP_LOAD, base + 32, 32, za[b][r][0], zb[b][r][0], zc[b][r][0]);
        r3(b, EOP_LOAD, base, 32, 0, 0, col[b][r][0]);
        r3(b, EOP_TREEGEZERO, 0, 0, ea[r], eb[r], ec[r]);
        r3(b, EOP_TREELTMEM, base + 32, 32, za[b][r][1], zb[b][r][1], zc[b][r][1]);
        r3(b, EOP_LOAD, base + 32, 32, za[b][r][1], zb[b][r][1], zc[b][r][1]);
        r3(b, EOP_LOAD, base, 32, 0, 0, col[b][r][1]);
        put_r(b, mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0));
        t_open(b);
        put_t(b, cfgw(b == 0, 1'b0, MODE_COMPOSITE));
        put_t(b, mk_iword(CLS_REGION_COPY, EOP_NOP, base, 64, 1'b0, 4'd0));
        put_t(b, mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
        t_close(b);
        buf_i++;
        // burp: a buffer's worth of handshake, no data
        put_r(b, mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0));
        t_open(b);
        put_t(b, cfgw(b == 0, 1'b0, MODE_IDLE));
        put_t(b, mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
        t_close(b);
        buf_i++;
      end
    end
    // ---- shader
    t_open(SHADER);
    put_t(SHADER, mk_iword(CLS_COMP_LEN, EOP_NOP, 0, 0, 1'b0, 4'd0));
    t_close(SHADER);
    for (int r = 0; r < NREG; r++) begin
      put_r(SHADER, mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0));
      put_r(SHADER, mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0));
      t_open(SHADER);                                   // load
      put_t(SHADER, cfgw(1'b0, 1'b1, MODE_LOAD_FWD));
      put_t(SHADER, mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
      t_close(SHADER);
      t_open(SHADER);                                   // shade and unload
      put_t(SHADER, mk_iword(CLS_REGION_COPY, EOP_NOP, 0, 64, 1'b1, 4'd0));
      r0(SHADER, EOP_SETENABS, 1'b1);
      r3(SHADER, EOP_MEMPLUSEQTREE, 0, 32, 0, 0, int'(SHADE_K), 1'b1);
      put_t(SHADER, mk_iword(CLS_REGION_COPY, EOP_NOP, 0, 64, 1'b0, 4'd0));
      put_t(SHADER, cfgw(1'b0, 1'b0, MODE_UNLOAD));
      put_t(SHADER, mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
      t_close(SHADER);
    end

    // ---- expected frame-buffer contents (back buffer = 1 until the swap)
    for (int r = 0; r < NREG; r++)
      for (int e = 0; e < NCHIP; e++)
        for (int p = 0; p < 256; p++) begin
          int x, y;
          logic [63:0] w0, w1, w;
          logic [9:0] sy;
          x = p % 16; y = 16 * (e % 8) + p / 16;
          w0 = render_word(0, r, x, y);
          w1 = render_word(1, r, x, y);
          w = (w0 < w1) ? w0 : w1;
          sy = 10'(128 * (r + 2) + y);
          exp_dram[{1'b1, sy, 3'(r + 1), 4'(x)}] = w[31:0] + SHADE_K;
        end

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < NB; b++)
      gp_write(b, 2'd0, {21'd16, 15'(rp[b] - 16)});
    for (int b = 0; b < NB; b++)
      foreach (tblocks[b][i]) gp_write(b, 2'd1, tblocks[b][i]);

    // wait for all 2*NREG transfers and the last drain
    while (n_xfer < 2 * NREG || fb_busy || dut.go[NB]) @(negedge clk);
    repeat (300) @(negedge clk);
    fb_swap = 1; @(negedge clk) fb_swap = 0;
    repeat (5) @(negedge clk);

    check(n_dram == NREG * NCHIP * 256, "every shaded pixel written once");
    foreach (exp_dram[a]) if (!n_written.exists(a)) begin check(0, "pixel missing"); break; end
    check(fb_front_buf == 1'b1, "buffer swapped");
    for (int b = 0; b < NB; b++)
      check(buff_cnt[b] == 0 && !xfer_wait[b] && !buff_wait[b], "boards idle at the end");
    $display("transfers %0d loads %0d burps %0d unloads %0d", n_xfer, n_load, n_burp, n_unload);
    $display("buffwait stalls %0d preemptions %0d mode switches %0d", n_buffwait, n_preempt, n_mode_switch);
    $display("ready-chain waits %0d xferwait holds %0d swaps %0d", n_ready_wait, n_xferwait_hold, n_swap);
    check(n_xfer == 2 * NREG, "transfer count");
    check(n_load == NREG, "load transfers happened");
    check(n_burp == NREG && n_unload == NREG, "burp / unload transfers happened");
    check(n_buffwait > 0, "BuffWait stall happened");
    check(n_preempt > 0, "pre-emption happened");
    check(n_mode_switch > 0, "compositor mode switch happened");
    check(n_ready_wait > 0, "master waited on the ready chain");
    check(n_xferwait_hold > 0, "XferWait held transfer commands back");
    check(n_swap == 1, "buffer swap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
