// rs_board: one renderer/shader board (rasterizer and compositor side).
//
// The board is a renderer or a shader only through the commands it is given.
// Its parts, as wired here:
//   * RFIFO and TFIFO (sync_fifo, 1K x 36 bits): control words written by the
//     graphics processor over its local bus;
//   * stream_parser: fetches the queued command blocks from VRAM and decides,
//     at each command boundary, whether rendering or transfer commands go
//     next (BuffCnt, BuffWait, XferWait, XferReady);
//   * igc: executes the commands, drives the EMC array and loads the
//     compositor configuration and transfer length;
//   * NCHIP EMCs and NCHIP compositor chips, paired one to one, covering the
//     160x128 region as 10 columns x 8 rows of 16x16 tiles (EMC e is tile
//     column e/8, row e%8);
//   * comp_sequencer and ready_go_ctrl: the control path of the network;
//   * gp_regs: status/command registers seen by the graphics processor.
// The graphics processor (i860), its VRAM and the message-network interface
// are outside this RTL; their connections are ports.
//
// Local bus (write only, one word per cycle): gp_addr 0 = push RFIFO control
// word, 1 = push TFIFO control word, 2 = command register. `gp_status` is the
// status register, always readable. The rasterizer side (parser, IGC, EMCs)
// executes on the 40 MHz strobe `tick`; the network side runs every 80 MHz
// clock. The address map is this design's own. The FIFOs' fill counts and
// the parser's stream flag are not needed on the board and are left open.
module rs_board
  import pf_pkg::*;
#(
  parameter int unsigned NCHIP      = EMCS_PER_BOARD,
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned START_DLY  = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tick,
  // graphics-processor local bus
  input  logic                      gp_we,
  input  logic [1:0]                gp_addr,
  input  logic [35:0]               gp_wdata,
  output logic [31:0]               gp_status,
  output logic                      gp_irq,
  // message-passing network interface events
  input  logic                      ring_tx_go,
  input  logic                      ring_rx_msg,
  output logic                      ring_end_msg,
  output logic                      ring_clr_msg,
  // VRAM serial port
  output logic                      vram_req,
  output logic [VRAM_AW-1:0]        vram_addr,
  input  logic                      vram_ack,
  input  logic [31:0]               vram_data,
  // image-composition network
  input  logic [NCHIP-1:0][1:0]     net_in,
  output logic [NCHIP-1:0][1:0]     net_out,
  input  logic                      ready_in,
  output logic                      ready_out,
  input  logic                      go_in,
  output logic                      go_out,
  // observation of the synchronization state
  output logic                      xfer_ready,
  output logic                      xfer_go,
  output logic                      xfer_enab,
  output logic                      buff_wait,
  output logic                      xfer_wait,
  output logic [2:0]                buff_cnt,
  output comp_cfg_t                 cfg
);

  if (NCHIP > TILE_ROWS * TILE_COLS) begin : g_nchip_check
    $error("rs_board: NCHIP exceeds the tiles of one region");
  end

  // ------------------------------------------------------------ FIFOs
  ctrl_word_t rf_dout, tf_dout;
  logic       rf_empty, rf_full, rf_pop, tf_empty, tf_full, tf_pop;

  sync_fifo #(.WIDTH(36), .DEPTH(FIFO_DEPTH)) u_rfifo (
    .clk, .rst_n, .push(gp_we && gp_addr == 2'd0), .din(gp_wdata),
    .pop(rf_pop), .dout(rf_dout), .empty(rf_empty), .full(rf_full), .count()
  );
  sync_fifo #(.WIDTH(36), .DEPTH(FIFO_DEPTH)) u_tfifo (
    .clk, .rst_n, .push(gp_we && gp_addr == 2'd1), .din(gp_wdata),
    .pop(tf_pop), .dout(tf_dout), .empty(tf_empty), .full(tf_full), .count()
  );

  gp_regs u_regs (
    .clk, .rst_n,
    .cmd_we(gp_we && gp_addr == 2'd2), .cmd_data(gp_wdata[31:0]),
    .status(gp_status), .end_msg(ring_end_msg), .clr_msg(ring_clr_msg), .irq(gp_irq),
    .rfifo_full(rf_full), .tfifo_full(tf_full),
    .rfifo_empty(rf_empty), .tfifo_empty(tf_empty),
    .tx_go(ring_tx_go), .rx_msg(ring_rx_msg)
  );

  // ---------------------------------------------------------- rasterizer
  logic     cmd_valid, cmd_ready;
  igc_cmd_t cmd;

  stream_parser u_parser (
    .clk, .rst_n,
    .rfifo_empty(rf_empty), .rfifo_dout(rf_dout), .rfifo_pop(rf_pop),
    .tfifo_empty(tf_empty), .tfifo_dout(tf_dout), .tfifo_pop(tf_pop),
    .vram_req, .vram_addr, .vram_ack, .vram_data,
    .cmd_valid, .cmd, .cmd_ready,
    .xfer_go, .xfer_ready,
    .buff_cnt, .buff_wait, .xfer_wait, .from_tfifo()
  );

  logic       emc_valid, cfg_we, len_we, len_long_in;
  emc_instr_t emc_instr;
  comp_cfg_t  cfg_in;

  igc u_igc (
    .clk, .rst_n, .tick,
    .cmd_valid, .cmd, .cmd_ready,
    .emc_valid, .emc_instr,
    .cfg_we, .cfg(cfg_in), .len_we, .len_long(len_long_in)
  );

  // ------------------------------------------------------- network control
  logic        len_long, phase, pix_start, done;
  logic [13:0] cnt;

  comp_sequencer #(.START_DLY(START_DLY)) u_seq (
    .clk, .rst_n,
    .cfg_we, .cfg_in, .len_we, .len_long_in,
    .cfg, .len_long,
    .xfer_go, .xfer_enab, .cnt, .phase, .pix_start, .done
  );

  ready_go_ctrl u_rg (
    .clk, .rst_n, .master(cfg.master),
    .xfer_ready, .ready_in, .ready_out,
    .go_in, .go_out, .xfer_go, .xfer_done(done)
  );

  // ------------------------------------------------ EMCs and compositors
  for (genvar e = 0; e < NCHIP; e++) begin : g_chip
    logic [1:0][1:0] rd, wr;
    logic            we;

    emc u_emc (
      .clk, .rst_n, .tick,
      .instr_valid(emc_valid), .instr(emc_instr),
      .tile_x0(8'((e / TILE_ROWS) * TILE_DIM)),
      .tile_y0(8'((e % TILE_ROWS) * TILE_DIM)),
      .xfer_enab, .cnt, .len_long,
      .port_rd(rd), .port_we(we && cfg.port_write), .port_wr(wr)
    );

    compositor_chip u_comp (
      .clk, .rst_n, .mode(cfg.mode),
      .xfer_enab, .phase, .pix_start,
      .net_in(net_in[e]), .net_out(net_out[e]),
      .emc_rd(rd), .emc_wr(wr), .emc_we(we)
    );
  end

endmodule
