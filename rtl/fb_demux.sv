// fb_demux: frame-buffer input demultiplexer for one pair of network wires.
//
// Each of the two wires carries one pixel stream at one bit per 80 MHz cycle.
// The demultiplexer gathers every two bits of a stream into a 2-bit pair at
// half the rate (40 MHz), ready for the corner turners, and at the same time
// forwards the wires, registered, to the next frame-buffer board. `phase` is
// the transfer's bit phase (0 = high bit of a pair); `pair_valid` is high in
// the cycle after the low bit arrived, with `pair[w]` = {high, low}.
// The document builds this stage from 22V10 PLDs (54 of them for 160 wires);
// this module covers two wires, one compositor chip's worth, which is this
// design's own partitioning.
module fb_demux (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            xfer_enab,
  input  logic            phase,
  input  logic [1:0]      net_in,
  output logic [1:0]      net_out,
  output logic [1:0][1:0] pair,
  output logic            pair_valid
);

  logic [1:0] hi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q       <= '0;
      net_out    <= '0;
      pair       <= '0;
      pair_valid <= 1'b0;
    end else begin
      net_out    <= net_in;
      pair_valid <= xfer_enab && phase;
      if (xfer_enab && !phase) hi_q <= net_in;
      if (xfer_enab && phase)
        for (int w = 0; w < 2; w++) pair[w] <= {hi_q[w], net_in[w]};
    end
  end

endmodule
