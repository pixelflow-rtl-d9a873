// stream_parser: DMA controller and stream parser at the rasterizer's input.
//
// The graphics processor queues work as control words {VRAM address, length}
// in two FIFOs: the RFIFO (rendering commands) and the TFIFO (copy and
// transfer commands). This block keeps one open block per FIFO (current
// address and words left), fetches command words from VRAM, assembles whole
// commands (an instruction word plus 0 or 3 coefficient words, decided by the
// instruction's three-bit class field) and hands them to the IGC.
//
// Choice of stream, made again at every command boundary (so a long RFIFO
// block is suspended, and later resumed, as soon as a transfer is due):
//   TFIFO  if XferWait is clear, TFIFO work is present and a rasterized region
//          is waiting (BuffCnt > 0);
//   RFIFO  else if BuffWait is clear and RFIFO work is present.
// IGC_REGION_DONE (RFIFO) increments BuffCnt and sets BuffWait when all
// MAX_BUFFS region buffers are full. IGC_REGION_XFER (TFIFO) waits for the IGC
// to finish earlier commands (the copy into the transfer buffer), then
// decrements BuffCnt, clears BuffWait and sets XferReady and XferWait.
// XferReady clears when XferGo rises; XferWait clears when XferGo falls.
//
// The semaphores follow the document's rasterizer algorithm. The BuffCnt > 0
// condition on the TFIFO is this design's addition: without it a copy queued
// ahead of its region's REGION_DONE could run before the region is rendered.
// VRAM handshake (request held until `vram_ack` returns the word) and one
// command in flight are also this design's choices; a command must not span
// two blocks.
module stream_parser
  import pf_pkg::*;
#(
  parameter int unsigned NUM_BUFFS = MAX_BUFFS
) (
  input  logic                clk,
  input  logic                rst_n,
  // hardware FIFOs
  input  logic                rfifo_empty,
  input  ctrl_word_t          rfifo_dout,
  output logic                rfifo_pop,
  input  logic                tfifo_empty,
  input  ctrl_word_t          tfifo_dout,
  output logic                tfifo_pop,
  // VRAM serial-port read
  output logic                vram_req,
  output logic [VRAM_AW-1:0]  vram_addr,
  input  logic                vram_ack,
  input  logic [31:0]         vram_data,
  // to the IGC
  output logic                cmd_valid,
  output igc_cmd_t            cmd,
  input  logic                cmd_ready,
  // composition-network synchronization
  input  logic                xfer_go,
  output logic                xfer_ready,
  // state, for status and observation
  output logic [2:0]          buff_cnt,
  output logic                buff_wait,
  output logic                xfer_wait,
  output logic                from_tfifo      // command in progress is from the TFIFO
);

  typedef enum logic [1:0] {S_SELECT, S_FETCH, S_EXEC} ps_state_e;
  ps_state_e state_q;

  logic [VRAM_AW-1:0] r_addr_q, t_addr_q;
  logic [CTRL_LW-1:0] r_left_q, t_left_q;
  logic [1:0]         nw_q;          // words of the command received so far
  logic               go_q;

  logic r_avail, t_avail, pick_t, pick_r;
  assign t_avail = (t_left_q != '0) || !tfifo_empty;
  assign r_avail = (r_left_q != '0) || !rfifo_empty;
  assign pick_t  = !xfer_wait && t_avail && (buff_cnt != '0);
  assign pick_r  = !pick_t && !buff_wait && r_avail;

  assign rfifo_pop = (state_q == S_SELECT) && pick_r && (r_left_q == '0);
  assign tfifo_pop = (state_q == S_SELECT) && pick_t && (t_left_q == '0);

  assign vram_req  = (state_q == S_FETCH);
  assign vram_addr = from_tfifo ? t_addr_q : r_addr_q;

  cmd_class_e cls;
  assign cls = cmd_class(cmd.iword);

  assign cmd_valid = (state_q == S_EXEC) &&
                     !(cls inside {CLS_REGION_DONE, CLS_REGION_XFER});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_SELECT;
      r_addr_q   <= '0;
      t_addr_q   <= '0;
      r_left_q   <= '0;
      t_left_q   <= '0;
      nw_q       <= '0;
      go_q       <= 1'b0;
      cmd        <= '0;
      from_tfifo <= 1'b0;
      buff_cnt   <= '0;
      buff_wait  <= 1'b0;
      xfer_wait  <= 1'b0;
      xfer_ready <= 1'b0;
    end else begin
      go_q <= xfer_go;
      unique case (state_q)
        S_SELECT: begin
          nw_q <= '0;
          if (pick_t) begin
            from_tfifo <= 1'b1;
            state_q    <= S_FETCH;
            if (t_left_q == '0) begin
              t_addr_q <= tfifo_dout.addr;
              t_left_q <= tfifo_dout.len;
            end
          end else if (pick_r) begin
            from_tfifo <= 1'b0;
            state_q    <= S_FETCH;
            if (r_left_q == '0) begin
              r_addr_q <= rfifo_dout.addr;
              r_left_q <= rfifo_dout.len;
            end
          end
        end
        S_FETCH: if (vram_ack) begin
          if (from_tfifo) begin
            t_addr_q <= t_addr_q + 1'b1;
            t_left_q <= t_left_q - 1'b1;
          end else begin
            r_addr_q <= r_addr_q + 1'b1;
            r_left_q <= r_left_q - 1'b1;
          end
          unique case (nw_q)
            2'd0: begin
              cmd.iword <= vram_data;
              cmd.a     <= '0;
              cmd.b     <= '0;
              cmd.c     <= '0;
            end
            2'd1: cmd.a     <= vram_data;
            2'd2: cmd.b     <= vram_data;
            default: cmd.c  <= vram_data;
          endcase
          if (nw_q == 2'd0 ? (cmd_operands(vram_data) == 0) : (nw_q == 2'd3))
            state_q <= S_EXEC;
          else
            nw_q <= nw_q + 1'b1;
        end
        S_EXEC: begin
          if (cls == CLS_REGION_DONE) begin
            buff_cnt <= buff_cnt + 1'b1;
            if (32'(buff_cnt) + 1 >= NUM_BUFFS) buff_wait <= 1'b1;
            state_q <= S_SELECT;
          end else if (cls == CLS_REGION_XFER) begin
            if (cmd_ready) begin          // IGC idle: the copy has finished
              buff_cnt   <= buff_cnt - 1'b1;
              xfer_ready <= 1'b1;
              xfer_wait  <= 1'b1;
              buff_wait  <= 1'b0;
              state_q    <= S_SELECT;
            end
          end else if (cmd_ready) begin
            state_q <= S_SELECT;
          end
        end
        default: state_q <= S_SELECT;
      endcase
      // synchronization with the composition network
      if (xfer_go && !go_q) xfer_ready <= 1'b0;
      if (!xfer_go && go_q) xfer_wait  <= 1'b0;
    end
  end

endmodule
