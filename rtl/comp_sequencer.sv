// comp_sequencer: compositor sequencer, a configuration register and a timer.
//
// The configuration register holds the compositor mode, the EMC serial-port
// direction and the master bit of the ready/go controller; it is written by
// the IGC_COMP_CONFIG command. The length bit (64- or 128-bit pixels) is
// written by IGC_COMP_LEN. When XferGo rises the timer waits START_DLY 80 MHz
// cycles (the startup delay "n" of the output sequencing), then holds
// XferEnab high for exactly 8,192 cycles (64-bit pixels) or 16,384 cycles
// (128-bit pixels): the time to send 256 pixels as 128 pairs over two wires.
// While XferEnab is high `cnt` is the transfer cycle number, from which the
// compositors and EMC ports take the bit within a pixel (`phase`,
// `pix_start`). `done` pulses for one cycle after the last transfer cycle.
// The register and timer follow the document; the value of START_DLY is this
// design's own.
module comp_sequencer
  import pf_pkg::*;
#(
  parameter int unsigned START_DLY = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,        // IGC_COMP_CONFIG
  input  comp_cfg_t   cfg_in,
  input  logic        len_we,        // IGC_COMP_LEN
  input  logic        len_long_in,   // 1: 128-bit pixels
  output comp_cfg_t   cfg,
  output logic        len_long,
  input  logic        xfer_go,
  output logic        xfer_enab,
  output logic [13:0] cnt,
  output logic        phase,
  output logic        pix_start,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_DELAY, S_XFER} seq_state_e;
  seq_state_e  state_q;
  logic        go_q;
  logic [3:0]  dly_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg      <= '{master: 1'b0, port_write: 1'b0, mode: MODE_IDLE};
      len_long <= 1'b0;
      state_q  <= S_IDLE;
      go_q     <= 1'b0;
      dly_q    <= '0;
      cnt      <= '0;
      done     <= 1'b0;
    end else begin
      go_q <= xfer_go;
      done <= 1'b0;
      if (cfg_we) cfg <= cfg_in;
      if (len_we) len_long <= len_long_in;
      unique case (state_q)
        S_IDLE: if (xfer_go && !go_q) begin
          if (START_DLY == 0) state_q <= S_XFER;
          else begin
            state_q <= S_DELAY;
            dly_q   <= 4'(START_DLY - 1);
          end
          cnt <= '0;
        end
        S_DELAY: begin
          if (dly_q == 0) state_q <= S_XFER;
          else            dly_q   <= dly_q - 1'b1;
        end
        S_XFER: begin
          if ((len_long  && cnt == 14'(XFER_CYC_LONG - 1)) ||
              (!len_long && cnt == 14'(XFER_CYC_SHORT - 1))) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
            cnt     <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign xfer_enab = (state_q == S_XFER);
  assign phase     = cnt[0];
  assign pix_start = len_long ? (cnt[6:0] == '0) : (cnt[5:0] == '0);

endmodule
