// ready_go_ctrl: the ready/go controller of one board's compositor.
//
// The ready chain runs upstream: a board raises ReadyOut once both ReadyIn
// (from the downstream board; the frame buffer starts the chain) and its own
// XferReady are high, so any board can hold the next transfer back. The go
// chain runs downstream: a slave copies GoIn to GoOut and to XferGo one 80 MHz
// cycle later. The master (the most upstream renderer, chosen by a bit of the
// compositor configuration register) does not pass ready on; it raises GoOut
// and XferGo itself when ReadyIn and XferReady are both high, and drops them
// when its sequencer reports the end of the transfer (`xfer_done`). Slaves
// drop XferGo when GoIn falls.
//
// All outputs are registered: one cycle per board in each chain, as the
// document's 2 x 12.5 ns per board overhead implies. The master starts only
// from its idle state, so a ready level left over from the previous transfer
// cannot start a new one before XferReady has fallen and risen again.
module ready_go_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic master,       // configuration bit
  input  logic xfer_ready,   // from the rasterizer
  input  logic ready_in,     // from the downstream board
  output logic ready_out,    // to the upstream board
  input  logic go_in,        // from the upstream board
  output logic go_out,       // to the downstream board
  output logic xfer_go,      // to the board's sequencer and stream parser
  input  logic xfer_done     // from the sequencer: transfer finished
);

  logic m_active_q;          // master: transfer started and not yet done

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_out  <= 1'b0;
      go_out     <= 1'b0;
      m_active_q <= 1'b0;
    end else if (master) begin
      ready_out <= 1'b0;
      if (!m_active_q && ready_in && xfer_ready) begin
        m_active_q <= 1'b1;
        go_out     <= 1'b1;
      end else if (m_active_q && xfer_done) begin
        m_active_q <= 1'b0;
        go_out     <= 1'b0;
      end
    end else begin
      ready_out  <= ready_in && xfer_ready;
      go_out     <= go_in;
      m_active_q <= 1'b0;
    end
  end

  assign xfer_go = go_out;

endmodule
