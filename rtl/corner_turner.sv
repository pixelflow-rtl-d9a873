// corner_turner: serial-to-parallel converter feeding one frame-buffer bank.
//
// Takes the 2-bit pairs of 16 pixel streams (eight compositor chips, two wires
// each: one 16-pixel-wide column of tiles of the region), rebuilds every
// pixel word (64 or 128 bits, sent z first), keeps its low 32 bits (colour;
// the z part is no longer needed) and writes these words one at a time into
// its DRAM bank's serial port. 16 pixels arrive every 64 cycles for 64-bit
// pixels, so one word leaves every 4 cycles of 80 MHz: 20 MHz, the rate of
// the DRAM serial port; for 128-bit pixels one leaves every 8 cycles.
//
// Address within the bank (18 bits, 256K words): {buffer, screen y (10 bits),
// region column rx (3 bits), pixel column in the tile (4 bits)}. With ten
// banks interleaved on 16-pixel columns this holds two 1280x1024 images,
// which is the document's ten 32-bit banks of 1 Mbit triple-port DRAM. The
// bit positions of colour within a pixel and this address map are this
// design's own choices.
module corner_turner
  import pf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 len_long,
  input  logic                 store,        // this transfer is kept
  input  logic                 back_buf,     // buffer being written
  input  logic [2:0]           rx,           // region column on the screen
  input  logic [2:0]           ry,           // region row on the screen
  input  logic [7:0][1:0][1:0] pair,         // [chip][wire][high,low]
  input  logic                 pair_valid,
  output logic                 dram_we,
  output logic [17:0]          dram_addr,
  output logic [31:0]          dram_data
);

  logic [PIX_LONG-1:0] sh_q   [16];     // pixel words being assembled
  logic [31:0]         hold_q [16];     // finished colour words
  logic [6:0]          pair_cnt_q;      // pair within the pixel
  logic [6:0]          pix_q;           // pixel pair index j of the stream
  logic [6:0]          hold_pix_q;      // j of the words in hold_q
  logic                emit_q;          // words in hold_q still to be written
  logic [6:0]          emit_cnt_q;
  logic [6:0]          last_pair;
  logic [3:0]          stream;
  logic [7:0]          pixel;           // pixel index within the EMC tile
  logic [9:0]          y;

  assign last_pair = len_long ? 7'(PIX_LONG / 2 - 1) : 7'(PIX_SHORT / 2 - 1);

  // output slot: every 4 (short) or 8 (long) cycles one stream
  logic slot;
  assign slot   = len_long ? (emit_cnt_q[2:0] == '0) : (emit_cnt_q[1:0] == '0);
  assign stream = len_long ? emit_cnt_q[6:3] : emit_cnt_q[5:2];

  always_comb begin
    pixel = {hold_pix_q, stream[0]};          // pixel 2j + wire
    y     = {ry, 7'd0} + {3'd0, stream[3:1], pixel[7:4]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pair_cnt_q <= '0;
      pix_q      <= '0;
      hold_pix_q <= '0;
      emit_q     <= 1'b0;
      emit_cnt_q <= '0;
      dram_we    <= 1'b0;
      dram_addr  <= '0;
      dram_data  <= '0;
    end else begin
      dram_we <= 1'b0;
      // emission of the previous pixel's words
      if (emit_q) begin
        if (slot && store) begin
          dram_we   <= 1'b1;
          dram_data <= hold_q[stream];
          dram_addr <= {back_buf, y, rx, pixel[3:0]};
        end
        emit_cnt_q <= emit_cnt_q + 1'b1;
        if (emit_cnt_q == (len_long ? 7'd127 : 7'd63)) emit_q <= 1'b0;
      end
      // assembly of the incoming pixel
      if (pair_valid) begin
        if (pair_cnt_q == last_pair) begin
          pair_cnt_q <= '0;
          pix_q      <= pix_q + 1'b1;
          hold_pix_q <= pix_q;
          emit_q     <= 1'b1;
          emit_cnt_q <= '0;
        end else begin
          pair_cnt_q <= pair_cnt_q + 1'b1;
        end
      end else if (!emit_q && pair_cnt_q == '0) begin
        pix_q <= '0;                      // between transfers
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pair_valid) begin
      for (int s = 0; s < 16; s++) begin
        sh_q[s] <= {sh_q[s][PIX_LONG-3:0], pair[s/2][s%2]};
        if (pair_cnt_q == last_pair)
          hold_q[s] <= {sh_q[s][29:0], pair[s/2][s%2]};
      end
    end
  end

endmodule
