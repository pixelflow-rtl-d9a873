// tb_rs_board: one renderer/shader board, master of its ready/go chain.
//
// The board has 8 EMC/compositor pairs (a 16x128 column of tiles) and
// 16-entry FIFOs. The testbench is its graphics processor (local-bus writes
// of control words and commands), its VRAM (command blocks, read through the
// serial port) and the network around it (upstream pixel stream, downstream
// ready). Three transfers:
//   1. composite: the board renders two z-buffered planes, copies the region
//      to its transfer buffer and composites it with a random upstream
//      stream; every output pixel must be the nearer (smaller) word;
//   2. load: the board loads a random upstream stream into its transfer
//      buffer while forwarding it unchanged;
//   3. unload: it copies the loaded region into memory and back, and sends it;
//      the output must equal what was loaded.
// Also checks the transfer length (8,192 cycles with XferEnab per 64-bit
// region), the start delay after go, that go is raised only with ReadyIn,
// the status register's FIFO bits, TxGo/message sticky bits, the interrupt,
// and the end-of-message pulse.
module tb_rs_board;
  import pf_pkg::*;
  localparam int NCHIP = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick, gp_we, gp_irq, ring_tx_go, ring_rx_msg, ring_end_msg, ring_clr_msg;
  logic [1:0] gp_addr;
  logic [35:0] gp_wdata;
  logic [31:0] gp_status;
  logic vram_req, vram_ack;
  logic [VRAM_AW-1:0] vram_addr;
  logic [31:0] vram_data;
  logic [NCHIP-1:0][1:0] net_in, net_out;
  logic ready_in, ready_out, go_in, go_out;
  logic xfer_ready, xfer_go, xfer_enab, buff_wait, xfer_wait;
  logic [2:0] buff_cnt;
  comp_cfg_t cfg;

  rs_board #(.NCHIP(NCHIP), .FIFO_DEPTH(16), .START_DLY(2)) dut (.*);

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

  always @(posedge clk) tick <= rst_n ? ~tick : 1'b0;

  // VRAM
  logic [31:0] vram [4096];
  always @(posedge clk) begin
    vram_ack  <= vram_req && !vram_ack;
    vram_data <= vram[vram_addr[11:0]];
  end

  // ------------------------------------------------------------ streams
  // in_word[e][p]: upstream pixel p of chip e in the current transfer
  logic [63:0] in_word  [3][NCHIP][256];
  logic [63:0] out_word [NCHIP][256];
  int xfer_n = 0;          // transfer in progress (0..2)
  int c_in = 0, c_out = 0; // transfer cycle being driven / captured
  int n_enab [3];
  logic enab_q = 0;

  // drive the upstream stream in the board's own transfer cycle
  always @(negedge clk) begin
    if (xfer_enab) begin
      int j, b;
      j = c_in / 64; b = c_in % 64;
      for (int e = 0; e < NCHIP; e++)
        for (int w = 0; w < 2; w++) net_in[e][w] = in_word[xfer_n][e][2*j+w][63-b];
      c_in++;
    end else net_in = '0;
  end
  // capture the registered output of the cycle that ends at this edge
  always @(posedge clk) begin
    if (rst_n && xfer_enab) begin
      int j, b;
      #1;
      j = c_out / 64; b = c_out % 64;
      for (int e = 0; e < NCHIP; e++)
        for (int w = 0; w < 2; w++) out_word[e][2*j+w][63-b] = net_out[e][w];
      c_out++;
    end
  end
  always @(posedge clk) begin
    enab_q <= xfer_enab;
    if (rst_n && xfer_enab) n_enab[xfer_n]++;
  end

  // go must only rise when the downstream side is ready
  logic go_q = 0;
  int go_rise_t = 0, enab_rise_t = 0, start_delay = -1;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    go_q <= go_out;
    if (go_out && !go_q) begin
      check(ready_in, "go raised with ReadyIn");
      go_rise_t = int'(cyc);
    end
    if (xfer_enab && !enab_q) start_delay = int'(cyc) - go_rise_t;
  end

  // ------------------------------------------------------------ program
  int rp = 16, tp = 2048;
  ctrl_word_t tb_list [$];
  int tstart;
  function automatic void put_r(input logic [31:0] w); vram[rp] = w; rp++; endfunction
  function automatic void put_t(input logic [31:0] w); vram[tp] = w; tp++; endfunction
  function automatic void r3(input emc_op_e op, input int addr, input int len,
                             input int a, input int b, input int c);
    put_r(mk_iword(CLS_RENDER3, op, addr, len, 1'b0, 4'd0));
    put_r(a); put_r(b); put_r(c);
  endfunction
  function automatic logic [31:0] cfgw(input bit pw, input comp_mode_e m);
    comp_cfg_t c;
    c = '{master: 1'b1, port_write: pw, mode: m};
    return mk_iword(CLS_COMP_CONFIG, EOP_NOP, 0, 0, 1'b0, 4'(c));
  endfunction
  function automatic void t_open(); tstart = tp; endfunction
  function automatic void t_close();
    tb_list.push_back('{addr: 21'(tstart), len: 15'(tp - tstart)});
  endfunction

  task automatic gp_write(input logic [1:0] a, input logic [35:0] d);
    @(negedge clk);
    gp_we = 1; gp_addr = a; gp_wdata = d;
    @(negedge clk);
    gp_we = 0;
  endtask

  int za0, zb0, zc0, za1, zb1, zc1;
  logic [31:0] c0, c1;
  function automatic logic [63:0] local_word(input int x, input int y);
    logic [31:0] z, c;
    int z2;
    z = 32'(za0 * x + zb0 * y + zc0); c = c0;
    z2 = za1 * x + zb1 * y + zc1;
    if (x - y + 20 >= 0 && z2 < int'(z)) begin z = 32'(z2); c = c1; end
    return {z, c};
  endfunction

  initial begin
    int n_end;
    tick = 0; gp_we = 0; gp_addr = 0; gp_wdata = 0; ring_tx_go = 0; ring_rx_msg = 0;
    ready_in = 0; go_in = 0; net_in = '0;
    n_enab = '{0, 0, 0};
    za0 = $urandom_range(0, 30) * 1000; zb0 = $urandom_range(0, 3000); zc0 = 1 << 22;
    za1 = $urandom_range(0, 30) * 1000; zb1 = $urandom_range(0, 3000); zc1 = 1 << 21;
    c0 = $urandom; c1 = $urandom;
    for (int e = 0; e < NCHIP; e++)
      for (int p = 0; p < 256; p++) begin
        in_word[0][e][p] = {4'($urandom_range(0, 1)), 28'($urandom), 32'($urandom)};
        in_word[1][e][p] = {$urandom, $urandom};
        in_word[2][e][p] = '0;
      end
    // rendering: two planes, the second z-tested, into buffer 0
    put_r(mk_iword(CLS_RENDER0, EOP_SETENABS, 0, 0, 1'b0, 4'd0));
    r3(EOP_LOAD, 32, 32, za0, zb0, zc0);
    r3(EOP_LOAD, 0, 32, 0, 0, int'(c0));
    r3(EOP_TREEGEZERO, 0, 0, 1, -1, 20);
    r3(EOP_TREELTMEM, 32, 32, za1, zb1, zc1);
    r3(EOP_LOAD, 32, 32, za1, zb1, zc1);
    r3(EOP_LOAD, 0, 32, 0, 0, int'(c1));
    for (int i = 0; i < 3; i++) put_r(mk_iword(CLS_REGION_DONE, EOP_NOP, 0, 0, 1'b0, 4'd0));
    t_open();
    put_t(mk_iword(CLS_COMP_LEN, EOP_NOP, 0, 0, 1'b0, 4'd0));
    put_t(cfgw(1'b0, MODE_COMPOSITE));
    put_t(mk_iword(CLS_REGION_COPY, EOP_NOP, 0, 64, 1'b0, 4'd0));
    put_t(mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
    t_close();
    t_open();
    put_t(cfgw(1'b1, MODE_LOAD_FWD));
    put_t(mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
    t_close();
    t_open();
    put_t(mk_iword(CLS_REGION_COPY, EOP_NOP, 128, 64, 1'b1, 4'd0));
    put_t(mk_iword(CLS_REGION_COPY, EOP_NOP, 128, 64, 1'b0, 4'd0));
    put_t(cfgw(1'b0, MODE_UNLOAD));
    put_t(mk_iword(CLS_REGION_XFER, EOP_NOP, 0, 0, 1'b0, 4'd0));
    t_close();

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    check(gp_status[3:0] == 4'b1111, "status: both FIFOs empty with room");
    gp_write(2'd0, {21'd16, 15'(rp - 16)});
    foreach (tb_list[i]) gp_write(2'd1, tb_list[i]);

    for (int t = 0; t < 3; t++) begin
      xfer_n = t; c_in = 0; c_out = 0;
      // hold ReadyIn low for a while: go must wait for it
      while (!xfer_ready) @(negedge clk);
      repeat (50) @(negedge clk);
      check(!go_out, "no go without ReadyIn");
      ready_in = 1;
      while (!xfer_enab) @(negedge clk);
      ready_in = 0;
      while (xfer_enab || enab_q) @(negedge clk);
      repeat (4) @(negedge clk);
      check(n_enab[t] == XFER_CYC_SHORT, "transfer lasts 8,192 cycles");
      check(start_delay == 3, "sequencer starts START_DLY+1 cycles after go");
      for (int e = 0; e < NCHIP; e++)
        for (int p = 0; p < 256; p++) begin
          logic [63:0] loc, exp_w;
          loc = local_word(p % 16, 16 * e + p / 16);
          case (t)
            0: exp_w = (loc < in_word[0][e][p]) ? loc : in_word[0][e][p];
            1: exp_w = in_word[1][e][p];
            default: exp_w = in_word[1][e][p];
          endcase
          check(out_word[e][p] == exp_w, t == 0 ? "composite output" :
                                         t == 1 ? "load: stream forwarded" : "unload output");
        end
    end

    // status and message-network events
    n_end = 0;
    @(negedge clk) ring_tx_go = 1; @(negedge clk) ring_tx_go = 0;
    @(negedge clk);
    check(gp_status[4] && !gp_irq, "TxGo sticky bit");
    @(negedge clk) ring_rx_msg = 1; @(negedge clk) ring_rx_msg = 0;
    @(negedge clk);
    check(gp_status[5] && gp_irq, "message bit and interrupt");
    fork
      begin repeat (4) begin @(posedge clk); if (ring_end_msg) n_end++; end end
      gp_write(2'd2, 32'h130);
    join
    check(n_end == 1, "end-of-message pulse");
    check(!gp_status[4] && !gp_status[5] && !gp_irq, "bits cleared by the command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
