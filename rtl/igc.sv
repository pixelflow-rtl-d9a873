// igc: Image Generation Controller of the rasterizer.
//
// Executes the commands assembled by the stream parser, one at a time, and
// drives the EMC array on the 40 MHz instruction strobe `tick`:
//   rendering commands  one EMC instruction with the command's A, B, C
//                       coefficients (the EMCs evaluate Ax+By+C themselves);
//   IGC_REGION_COPY     bit-serial copy of `len` bits between a region buffer
//                       and the transfer buffer, two EMC ticks per bit (read
//                       into carry, write from carry): 128 ticks = 3.2 us for
//                       64-bit pixels, 256 ticks for 128-bit pixels;
//   IGC_COMP_CONFIG     loads the compositor configuration register;
//   IGC_COMP_LEN        loads the transfer length (64 or 128-bit pixels).
// `cmd_ready` is high only when the IGC is idle, so the stream parser knows
// that every earlier command (in particular a copy) has completed.
//
// The document describes the IGC as a microcoded custom chip with a
// floating-point to fixed-point serializer; its microcode is not given. This
// block is the simplest controller with the same effect: coefficients arrive
// as 32-bit fixed-point integers, and each rendering command costs one tick.
module igc
  import pf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,
  input  logic        cmd_valid,
  input  igc_cmd_t    cmd,
  output logic        cmd_ready,
  output logic        emc_valid,
  output emc_instr_t  emc_instr,
  output logic        cfg_we,
  output comp_cfg_t   cfg,
  output logic        len_we,
  output logic        len_long
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_COPY} igc_state_e;
  igc_state_e state_q;

  emc_instr_t  instr_q;
  logic [8:0]  src_q, dst_q;
  logic [7:0]  left_q;
  logic        wr_phase_q;    // 0: read into carry, 1: write from carry

  assign cmd_ready = (state_q == S_IDLE);
  assign emc_valid = (state_q != S_IDLE);

  always_comb begin
    emc_instr = instr_q;
    if (state_q == S_COPY) begin
      emc_instr      = '0;
      emc_instr.op   = wr_phase_q ? EOP_WRCARRY : EOP_RDCARRY;
      emc_instr.addr = wr_phase_q ? dst_q : src_q;
      emc_instr.len  = 8'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      instr_q    <= '0;
      src_q      <= '0;
      dst_q      <= '0;
      left_q     <= '0;
      wr_phase_q <= 1'b0;
      cfg_we     <= 1'b0;
      cfg        <= '{master: 1'b0, port_write: 1'b0, mode: MODE_IDLE};
      len_we     <= 1'b0;
      len_long   <= 1'b0;
    end else begin
      cfg_we <= 1'b0;
      len_we <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          unique case (cmd_class(cmd.iword))
            CLS_RENDER0, CLS_RENDER3: begin
              instr_q.op   <= emc_op_e'(cmd.iword[28:26]);
              instr_q.addr <= cmd.iword[25:17];
              instr_q.len  <= cmd.iword[16:9];
              instr_q.a    <= cmd.a;
              instr_q.b    <= cmd.b;
              instr_q.c    <= cmd.c;
              state_q      <= S_EXEC;
            end
            CLS_REGION_COPY: if (cmd.iword[16:9] != '0) begin
              if (cmd.iword[8]) begin           // transfer buffer -> memory
                src_q <= 9'(XBUF_BASE);
                dst_q <= cmd.iword[25:17];
              end else begin                    // memory -> transfer buffer
                src_q <= cmd.iword[25:17];
                dst_q <= 9'(XBUF_BASE);
              end
              left_q     <= cmd.iword[16:9];
              wr_phase_q <= 1'b0;
              state_q    <= S_COPY;
            end
            CLS_COMP_CONFIG: begin
              cfg_we <= 1'b1;
              cfg    <= comp_cfg_t'(cmd.iword[3:0]);
            end
            CLS_COMP_LEN: begin
              len_we   <= 1'b1;
              len_long <= cmd.iword[8];
            end
            default: ;
          endcase
        end
        S_EXEC: if (tick) state_q <= S_IDLE;
        S_COPY: if (tick) begin
          wr_phase_q <= ~wr_phase_q;
          if (wr_phase_q) begin
            src_q  <= src_q + 1'b1;
            dst_q  <= dst_q + 1'b1;
            left_q <= left_q - 1'b1;
            if (left_q == 8'd1) state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
