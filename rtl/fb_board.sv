// fb_board: network side of the frame-buffer board.
//
// The frame buffer is the downstream end of the image-composition network and
// the start of the ready chain. It raises ReadyOut when its controller says it
// can take the next region (`fb_ready`) and no transfer is in progress. When
// go arrives it times the transfer with its own sequencer, exactly as the
// compositor boards do: go is registered once on entry, like a board's go
// output, so the sequencer starts one cycle after the last board's and its
// demultiplexers sample every wire in the cycle after that board drove it.
// The 160 wires are demultiplexed to 2-bit pairs (fb_demux, also
// forwarding the stream for a further frame-buffer board) and handed to ten
// corner turners, one per 32-bit DRAM bank, that write colour words at 20 MHz.
//
// The rendering recipe of the frame buffer (store this region or not, where
// it goes, when to swap buffers) comes from its controller processor, which
// is not part of this RTL: `store`, `rx`, `ry` and `len_long` are sampled when
// go arrives; `swap` exchanges the displayed and written buffers. The DRAMs
// themselves, their video ports, look-up tables and DACs are outside.
//
// Lint notes: all demultiplexers run from the same sequencer, so their
// `pair_valid` outputs are identical and each corner turner reads only the
// first one of its eight; the others are left unread. The sequencer's
// configuration, length, counter and pixel-start outputs are left open
// because the frame buffer only needs XferEnab, the bit phase and done.
module fb_board
  import pf_pkg::*;
#(
  parameter int unsigned NCHIP = EMCS_PER_BOARD,       // 80 chips = 160 wires
  parameter int unsigned START_DLY = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NCHIP-1:0][1:0]      net_in,
  output logic [NCHIP-1:0][1:0]      net_out,
  output logic                       ready_out,
  input  logic                       go_in,
  // controller side
  input  logic                       fb_ready,
  input  logic                       store,
  input  logic [2:0]                 rx,
  input  logic [2:0]                 ry,
  input  logic                       len_long,
  input  logic                       swap,
  output logic                       front_buf,     // buffer being displayed
  output logic                       busy,
  // DRAM bank serial ports
  output logic [NCHIP/8-1:0]         dram_we,
  output logic [NCHIP/8-1:0][17:0]   dram_addr,
  output logic [NCHIP/8-1:0][31:0]   dram_data
);

  localparam int unsigned NCT = NCHIP / 8;   // corner turners / DRAM banks

  logic        xfer_enab, phase, done;
  logic        go_q, store_q;
  logic [2:0]  rx_q, ry_q;
  logic        long_q;
  logic [7:0]  drain_q;                      // corner turners still emitting

  comp_sequencer #(.START_DLY(START_DLY)) u_seq (
    .clk, .rst_n,
    .cfg_we(1'b0), .cfg_in('0),
    .len_we(go_in && !go_q), .len_long_in(len_long),
    .cfg(), .len_long(),
    .xfer_go(go_q), .xfer_enab, .cnt(), .phase, .pix_start(), .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      go_q      <= 1'b0;
      store_q   <= 1'b0;
      rx_q      <= '0;
      ry_q      <= '0;
      long_q    <= 1'b0;
      front_buf <= 1'b0;
      ready_out <= 1'b0;
      drain_q   <= '0;
    end else begin
      go_q <= go_in;
      if (go_in && !go_q) begin
        store_q <= store;
        rx_q    <= rx;
        ry_q    <= ry;
        long_q  <= len_long;
      end
      if (swap) front_buf <= ~front_buf;
      if (done)                drain_q <= 8'd130;
      else if (drain_q != '0)  drain_q <= drain_q - 1'b1;
      ready_out <= fb_ready && !go_in && !busy;
    end
  end

  // the last pixel is written out for up to 128 cycles after the transfer
  assign busy = xfer_enab || done || (drain_q != '0);

  logic [NCHIP-1:0][1:0][1:0] pair;
  logic [NCHIP-1:0]           pair_valid;

  for (genvar e = 0; e < NCHIP; e++) begin : g_dmx
    fb_demux u_dmx (
      .clk, .rst_n, .xfer_enab, .phase,
      .net_in(net_in[e]), .net_out(net_out[e]),
      .pair(pair[e]), .pair_valid(pair_valid[e])
    );
  end

  for (genvar k = 0; k < NCT; k++) begin : g_ct
    corner_turner u_ct (
      .clk, .rst_n,
      .len_long(long_q), .store(store_q), .back_buf(~front_buf),
      .rx(rx_q), .ry(ry_q),
      .pair(pair[8*k +: 8]), .pair_valid(pair_valid[8*k]),
      .dram_we(dram_we[k]), .dram_addr(dram_addr[k]), .dram_data(dram_data[k])
    );
  end

endmodule
