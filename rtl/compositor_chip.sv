// compositor_chip: one compositor of the image-composition network.
//
// Each chip handles two bit-serial pixel streams (one per network wire). Its
// EMC presents two bits of each of two pixels per 40 MHz tick; the chip sends
// the high bit of each pair in the first 80 MHz cycle and the low bit in the
// second, so each wire carries one pixel bit per 80 MHz cycle. Pixels go out
// z first, most-significant bit first.
//
// Modes (configuration register, loaded by the IGC):
//   MODE_COMPOSITE  For each pixel two state bits record whether the nearer
//                   pixel has been found and which one it is. Until the
//                   streams differ, the common bit is sent. At the first
//                   differing bit the stream holding a 0 (the smaller, nearer
//                   z) wins, and the rest of that pixel is taken from it.
//   MODE_LOAD_FWD   Upstream bits are forwarded unchanged and, paired up again,
//                   offered to the EMC serial port for writing.
//   MODE_UNLOAD     EMC bits are sent; upstream bits are ignored.
//   MODE_IDLE       Zeros are sent.
//
// Timing: the outputs are registered (one 80 MHz cycle per board, matched by
// the one-cycle hop of the go chain, so every board sees its upstream data in
// the same transfer cycle as its own EMC data). `phase` is 0 for the high bit
// of a pair and 1 for the low bit; `pix_start` marks the first bit of a pixel.
// The choice that ties (equal pixels) fall to whichever stream wins the first
// differing data bit, and the idle mode, are this design's own.
module compositor_chip
  import pf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  comp_mode_e       mode,
  input  logic             xfer_enab,     // transfer in progress (80 MHz cycles)
  input  logic             phase,         // 0: high bit of pair, 1: low bit
  input  logic             pix_start,     // first bit of a pixel
  input  logic [1:0]       net_in,        // upstream wires
  output logic [1:0]       net_out,       // downstream wires (registered)
  input  logic [1:0][1:0]  emc_rd,        // [wire][1=high,0=low] from EMC port
  output logic [1:0][1:0]  emc_wr,        // pair to write into EMC port
  output logic             emc_we         // write strobe (end of a pair)
);

  logic [1:0] decided_q, local_q;   // per wire: decision made, local in front
  logic [1:0] in_hi_q;              // high bit of the incoming pair

  logic [1:0] local_bit;
  logic [1:0] decided_d, local_d, comp_bit;

  always_comb begin
    for (int w = 0; w < 2; w++) begin
      local_bit[w] = phase ? emc_rd[w][0] : emc_rd[w][1];
      // state is cleared at the start of each pixel
      decided_d[w] = pix_start ? 1'b0 : decided_q[w];
      local_d[w]   = pix_start ? 1'b0 : local_q[w];
      if (!decided_d[w] && (local_bit[w] != net_in[w])) begin
        decided_d[w] = 1'b1;
        local_d[w]   = ~local_bit[w];        // local holds the 0: nearer
      end
      comp_bit[w] = (decided_d[w] && local_d[w]) ? local_bit[w] : net_in[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      net_out   <= '0;
      decided_q <= '0;
      local_q   <= '0;
      in_hi_q   <= '0;
    end else begin
      if (xfer_enab) begin
        unique case (mode)
          MODE_COMPOSITE: net_out <= comp_bit;
          MODE_LOAD_FWD:  net_out <= net_in;
          MODE_UNLOAD:    net_out <= local_bit;
          default:        net_out <= '0;
        endcase
        decided_q <= decided_d;
        local_q   <= local_d;
        if (!phase) in_hi_q <= net_in;
      end else begin
        net_out   <= '0;
        decided_q <= '0;
        local_q   <= '0;
      end
    end
  end

  // Load path: the completed pair is written in the low-bit cycle
  always_comb begin
    for (int w = 0; w < 2; w++) emc_wr[w] = {in_hi_q[w], net_in[w]};
    emc_we = xfer_enab && phase && (mode == MODE_LOAD_FWD);
  end

endmodule
