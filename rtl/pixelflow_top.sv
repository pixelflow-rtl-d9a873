// pixelflow_top: PixelFlow image-composition system, network view.
//
// NUM_BOARDS renderer/shader boards sit in a line on the image-composition
// network, board 0 most upstream, followed by the frame-buffer board. Pixel
// streams (2 wires per compositor chip, 160 wires for 80 chips) and the go
// token flow downstream, one 80 MHz register per board; the ready token flows
// upstream from the frame buffer. Every board follows its own command stream,
// so whether it renders and composites, or loads, shades and unloads as a
// shader, is decided by software (its rendering recipe); the master of the
// ready/go chain is the board whose configuration says so, normally board 0.
//
// The default is the two-card-cage configuration the document evaluates: 36
// renderers and 4 shaders (40 boards) with 80 EMC/compositor pairs each.
// Outside this RTL, and brought out as ports: each board's graphics processor
// (local-bus writes to its FIFOs and command register), its VRAM serial port,
// its message-network events, the network input of board 0 (fed by the host
// interface's pixel buffer), the frame buffer's controller, and the frame
// buffer's DRAM banks. A single 80 MHz clock drives the design; the 40 MHz
// rasterizer strobe `tick` is made here by halving it.
//
// Lint note: the FIFOs' overflow/underflow assertions use rst_n in their
// `disable iff` clause, so rst_n is seen as both an asynchronous reset and a
// synchronous signal. The assertions are checks only and add no logic.
module pixelflow_top
  import pf_pkg::*;
#(
  parameter int unsigned NUM_BOARDS = 40,
  parameter int unsigned NCHIP      = EMCS_PER_BOARD,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned START_DLY  = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // graphics processors
  input  logic [NUM_BOARDS-1:0]                  gp_we,
  input  logic [NUM_BOARDS-1:0][1:0]             gp_addr,
  input  logic [NUM_BOARDS-1:0][35:0]            gp_wdata,
  output logic [NUM_BOARDS-1:0][31:0]            gp_status,
  output logic [NUM_BOARDS-1:0]                  gp_irq,
  // message-passing network interface events
  input  logic [NUM_BOARDS-1:0]                  ring_tx_go,
  input  logic [NUM_BOARDS-1:0]                  ring_rx_msg,
  output logic [NUM_BOARDS-1:0]                  ring_end_msg,
  output logic [NUM_BOARDS-1:0]                  ring_clr_msg,
  // VRAM serial ports
  output logic [NUM_BOARDS-1:0]                  vram_req,
  output logic [NUM_BOARDS-1:0][VRAM_AW-1:0]     vram_addr,
  input  logic [NUM_BOARDS-1:0]                  vram_ack,
  input  logic [NUM_BOARDS-1:0][31:0]            vram_data,
  // head of the network (host interface)
  input  logic [NCHIP-1:0][1:0]                  net_head_in,
  input  logic                                   go_head_in,
  output logic                                   ready_head_out,
  // frame buffer controller and DRAM banks
  input  logic                                   fb_ready,
  input  logic                                   fb_store,
  input  logic [2:0]                             fb_rx,
  input  logic [2:0]                             fb_ry,
  input  logic                                   fb_len_long,
  input  logic                                   fb_swap,
  output logic                                   fb_front_buf,
  output logic                                   fb_busy,
  output logic [NCHIP/8-1:0]                     dram_we,
  output logic [NCHIP/8-1:0][17:0]               dram_addr,
  output logic [NCHIP/8-1:0][31:0]               dram_data,
  output logic [NCHIP-1:0][1:0]                  net_tail_out,
  // synchronization state of every board
  output logic [NUM_BOARDS-1:0]                  xfer_ready,
  output logic [NUM_BOARDS-1:0]                  xfer_go,
  output logic [NUM_BOARDS-1:0]                  xfer_enab,
  output logic [NUM_BOARDS-1:0]                  buff_wait,
  output logic [NUM_BOARDS-1:0]                  xfer_wait,
  output logic [NUM_BOARDS-1:0][2:0]             buff_cnt,
  output comp_cfg_t [NUM_BOARDS-1:0]             board_cfg
);

  logic tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tick <= 1'b0;
    else        tick <= ~tick;
  end

  logic [NUM_BOARDS:0][NCHIP-1:0][1:0] net;     // net[i] enters board i
  logic [NUM_BOARDS:0]                 go;      // go[i] enters board i
  logic [NUM_BOARDS:0]                 ready;   // ready[i] leaves board i

  assign net[0] = net_head_in;
  assign go[0]  = go_head_in;
  assign ready_head_out = ready[0];

  for (genvar i = 0; i < NUM_BOARDS; i++) begin : g_board
    rs_board #(.NCHIP(NCHIP), .FIFO_DEPTH(FIFO_DEPTH), .START_DLY(START_DLY)) u_board (
      .clk, .rst_n, .tick,
      .gp_we(gp_we[i]), .gp_addr(gp_addr[i]), .gp_wdata(gp_wdata[i]),
      .gp_status(gp_status[i]), .gp_irq(gp_irq[i]),
      .ring_tx_go(ring_tx_go[i]), .ring_rx_msg(ring_rx_msg[i]),
      .ring_end_msg(ring_end_msg[i]), .ring_clr_msg(ring_clr_msg[i]),
      .vram_req(vram_req[i]), .vram_addr(vram_addr[i]),
      .vram_ack(vram_ack[i]), .vram_data(vram_data[i]),
      .net_in(net[i]), .net_out(net[i+1]),
      .ready_in(ready[i+1]), .ready_out(ready[i]),
      .go_in(go[i]), .go_out(go[i+1]),
      .xfer_ready(xfer_ready[i]), .xfer_go(xfer_go[i]), .xfer_enab(xfer_enab[i]),
      .buff_wait(buff_wait[i]), .xfer_wait(xfer_wait[i]), .buff_cnt(buff_cnt[i]),
      .cfg(board_cfg[i])
    );
  end

  fb_board #(.NCHIP(NCHIP), .START_DLY(START_DLY)) u_fb (
    .clk, .rst_n,
    .net_in(net[NUM_BOARDS]), .net_out(net_tail_out),
    .ready_out(ready[NUM_BOARDS]), .go_in(go[NUM_BOARDS]),
    .fb_ready, .store(fb_store), .rx(fb_rx), .ry(fb_ry), .len_long(fb_len_long),
    .swap(fb_swap), .front_buf(fb_front_buf), .busy(fb_busy),
    .dram_we, .dram_addr, .dram_data
  );

endmodule
