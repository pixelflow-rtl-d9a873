// gp_regs: status and command registers of the graphics processor.
//
// The status register, read at any time, holds a 16-bit synchronization timer
// in bits [31:16] and status bits below it. The timer is cleared by reset and
// then advances once every 50 ns (TIMER_DIV cycles of the 80 MHz clock), so
// that boards released from the same reset count together; on overflow it
// sets a sticky interrupt bit. Sticky bits stay set until a command-register
// write with a 1 in their position clears them. Bits:
//   [0] RFIFO has room      [1] TFIFO has room
//   [2] RFIFO empty         [3] TFIFO empty
//   [4] TxGo received (sticky)      [5] message received (sticky)
//   [6] timer overflow (sticky)
// Command register writes also produce one-cycle pulses for "end of outgoing
// message" (bit 8) and "incoming message processed" (bit 9). `irq` is the OR
// of the message and timer interrupt bits.
// The list of status bits and commands follows the document; the bit
// positions and the single write-one-to-clear register are this design's.
// Lint note: the command register decodes only bits 4..6, 8 and 9 of the
// 32-bit local-bus word; the remaining bits are ignored by design.
module gp_regs #(
  parameter int unsigned TIMER_DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_we,          // write to the command register
  input  logic [31:0] cmd_data,
  output logic [31:0] status,
  output logic        end_msg,
  output logic        clr_msg,
  output logic        irq,
  input  logic        rfifo_full,
  input  logic        tfifo_full,
  input  logic        rfifo_empty,
  input  logic        tfifo_empty,
  input  logic        tx_go,           // event: transmit channel acquired
  input  logic        rx_msg           // event: a message has arrived
);

  logic [15:0] timer_q;
  logic [$clog2(TIMER_DIV > 1 ? TIMER_DIV : 2)-1:0] div_q;
  logic        s_txgo_q, s_rx_q, s_tmr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer_q  <= '0;
      div_q    <= '0;
      s_txgo_q <= 1'b0;
      s_rx_q   <= 1'b0;
      s_tmr_q  <= 1'b0;
      end_msg  <= 1'b0;
      clr_msg  <= 1'b0;
    end else begin
      end_msg <= cmd_we && cmd_data[8];
      clr_msg <= cmd_we && cmd_data[9];
      if (32'(div_q) == TIMER_DIV - 1) begin
        div_q   <= '0;
        timer_q <= timer_q + 1'b1;
        if (timer_q == 16'hFFFF) s_tmr_q <= 1'b1;
      end else begin
        div_q <= div_q + 1'b1;
      end
      if (tx_go)  s_txgo_q <= 1'b1;
      if (rx_msg) s_rx_q   <= 1'b1;
      if (cmd_we) begin
        if (cmd_data[4]) s_txgo_q <= 1'b0;
        if (cmd_data[5]) s_rx_q   <= 1'b0;
        if (cmd_data[6]) s_tmr_q  <= 1'b0;
      end
    end
  end

  assign status = {timer_q, 9'd0, s_tmr_q, s_rx_q, s_txgo_q,
                   tfifo_empty, rfifo_empty, ~tfifo_full, ~rfifo_full};
  assign irq    = s_rx_q || s_tmr_q;

endmodule
