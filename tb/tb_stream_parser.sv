// tb_stream_parser: the stream parser and DMA engine with modelled FIFOs, VRAM,
// IGC and composition network.
//
// Six regions of rendering commands sit in ONE RFIFO block (so transfer
// commands must pre-empt it at command boundaries and the block must resume
// afterwards); each region's copy and transfer commands are a TFIFO block.
// The network answers XferReady with XferGo only after a long delay, so the
// four region buffers fill up and BuffWait must stop rendering. Checks:
// every command reaches the IGC intact and in order within its stream; no
// copy for region i before region i's REGION_DONE; BuffCnt never above 4;
// no rendering command while BuffWait is set; no transfer command while
// XferWait is set; XferReady only when the IGC is idle; XferReady clears when
// XferGo rises. Counts how often BuffWait stalls and pre-emption occurred.
module tb_stream_parser;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rfifo_empty, tfifo_empty, rfifo_pop, tfifo_pop;
  ctrl_word_t rfifo_dout, tfifo_dout;
  logic vram_req, vram_ack;
  logic [VRAM_AW-1:0] vram_addr;
  logic [31:0] vram_data;
  logic cmd_valid, cmd_ready, xfer_go, xfer_ready, buff_wait, xfer_wait, from_tfifo;
  igc_cmd_t cmd;
  logic [2:0] buff_cnt;

  stream_parser dut (.*);

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

  // ------------------------------------------------------------ VRAM model
  logic [31:0] vram [4096];
  int          vlat;
  always @(posedge clk) begin
    vram_ack <= 1'b0;
    if (vram_req && !vram_ack) begin
      if (vlat == 0) begin
        vram_ack  <= 1'b1;
        vram_data <= vram[vram_addr[11:0]];
        vlat      <= $urandom_range(0, 2);
      end else vlat <= vlat - 1;
    end
  end

  // ------------------------------------------------------------ FIFO models
  ctrl_word_t rq [$], tq [$];
  assign rfifo_empty = (rq.size() == 0);
  assign tfifo_empty = (tq.size() == 0);
  assign rfifo_dout  = rfifo_empty ? '0 : rq[0];
  assign tfifo_dout  = tfifo_empty ? '0 : tq[0];
  // pops take effect just after the edge, so the DUT samples the old head
  logic pr_q = 0, pt_q = 0;
  always @(posedge clk) begin
    pr_q <= rfifo_pop;
    pt_q <= tfifo_pop;
  end
  always @(negedge clk) begin
    if (pr_q) void'(rq.pop_front());
    if (pt_q) void'(tq.pop_front());
  end

  // ------------------------------------------------------------- IGC model
  int busy;
  igc_cmd_t got_r [$], got_t [$];
  int n_copy = 0;
  assign cmd_ready = (busy == 0);
  always @(posedge clk) begin
    if (busy > 0) busy <= busy - 1;
    else if (cmd_valid && rst_n) begin
      if (from_tfifo) got_t.push_back(cmd); else got_r.push_back(cmd);
      // copy of region i may only start once region i is rendered
      if (from_tfifo && cmd_class(cmd.iword) == CLS_REGION_COPY) begin
        check(got_r.size() >= rdone_at[n_copy], "copy after the region's REGION_DONE");
        n_copy++;
      end
      busy <= (cmd_class(cmd.iword) == CLS_REGION_COPY) ? 40 : $urandom_range(0, 3);
    end
  end

  // ----------------------------------------------------- network model
  int go_delay = 3000, n_xfers = 0;
  initial begin
    xfer_go = 0;
    forever begin
      @(posedge clk);
      if (xfer_ready) begin
        repeat (go_delay) @(posedge clk);
        xfer_go <= 1;
        @(posedge clk); #1;
        check(!xfer_ready, "XferReady clears when XferGo rises");
        repeat (200) @(posedge clk);
        xfer_go <= 0;
        n_xfers++;
      end
    end
  end

  // ----------------------------------------------------- protocol monitors
  int n_buffwait_stall = 0, n_preempt = 0;
  logic bw_q;
  always @(posedge clk) if (rst_n) begin
    bw_q <= buff_wait;
    if (buff_wait && !bw_q) n_buffwait_stall++;
    if (buff_cnt > 4) begin checks++; failures++; $display("BuffCnt above 4"); end
    if (cmd_valid && cmd_ready) begin
      if (!from_tfifo && buff_wait) begin checks++; failures++; $display("render during BuffWait"); end
      if (from_tfifo && xfer_wait) begin checks++; failures++; $display("transfer cmd during XferWait"); end
      if (from_tfifo && dut.r_left_q != 0) n_preempt++;
    end
    if (xfer_ready && !dut.xfer_ready) ;
  end
  logic xr_q;
  always @(posedge clk) begin
    xr_q <= xfer_ready;
    if (xfer_ready && !xr_q) check(busy == 0 && got_t.size() > 0 &&
                                   cmd_class(got_t[$].iword) == CLS_REGION_COPY,
                                   "XferReady after the copy completed");
  end

  // ------------------------------------------------------------ stimulus
  localparam int NREG = 6, NPRIM = 5;
  igc_cmd_t exp_r [$], exp_t [$];
  int rdone_at [NREG];      // number of R commands that precede region i's DONE

  initial begin
    int wp;
    vlat = 0;
    rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // build the VRAM image
    wp = 16;
    for (int i = 0; i < NREG; i++) begin
      for (int k = 0; k < NPRIM; k++) begin
        igc_cmd_t c;
        c = '0;
        c.iword = mk_iword(CLS_RENDER3, EOP_LOAD, 32 * k, 32, 1'b0, 4'd0);
        c.a = $urandom; c.b = $urandom; c.c = $urandom;
        vram[wp++] = c.iword; vram[wp++] = c.a; vram[wp++] = c.b; vram[wp++] = c.c;
        exp_r.push_back(c);
        if (k == 2) begin
          c = '0; c.iword = mk_iword(CLS_RENDER0, EOP_SETENABS, 0, 0, 1'b0, 4'd0);
          vram[wp++] = c.iword; exp_r.push_back(c);
        end
      end
      vram[wp++] = mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0);
      rdone_at[i] = exp_r.size();
    end
    rq.push_back('{addr: 21'd16, len: 15'(wp - 16)});
    for (int i = 0; i < NREG; i++) begin
      int base;
      igc_cmd_t c;
      base = 2048 + 8 * i;
      c = '0; c.iword = mk_iword(CLS_COMP_CONFIG, EOP_NOP, 0, 0, 1'b0, 4'(i));
      vram[base] = c.iword; exp_t.push_back(c);
      c = '0; c.iword = mk_iword(CLS_REGION_COPY, EOP_NOP, 64 * (i % 4), 64, 1'b0, 4'd0);
      vram[base + 1] = c.iword; exp_t.push_back(c);
      vram[base + 2] = mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0);
      tq.push_back('{addr: 21'(base), len: 15'd3});
    end
    // wait for everything to go through
    while (n_xfers < NREG) begin
      @(posedge clk);
      // copy i must come after region i's REGION_DONE
      if (got_t.size() > 0 && got_t.size() % 2 == 0) ;
    end
    repeat (50) @(posedge clk);
    check(got_r.size() == exp_r.size(), "all rendering commands delivered");
    for (int i = 0; i < exp_r.size() && i < got_r.size(); i++)
      check(got_r[i] == exp_r[i], "rendering command intact and in order");
    check(got_t.size() == exp_t.size(), "all transfer commands delivered");
    for (int i = 0; i < exp_t.size() && i < got_t.size(); i++)
      check(got_t[i].iword == exp_t[i].iword, "transfer command intact and in order");
    check(n_buffwait_stall > 0, "BuffWait stall happened");
    check(n_preempt > 0, "RFIFO block pre-empted by transfer commands");
    check(buff_cnt == 0 && !buff_wait && !xfer_wait, "idle at the end");
    $display("buffwait stalls %0d, pre-emptions %0d", n_buffwait_stall, n_preempt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
