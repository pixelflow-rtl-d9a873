// emc: one PixelFlow enhanced memory chip (EMC), 256 pixel processors.
//
// The chip covers a 16x16-pixel tile of the 160x128 screen region. Every
// pixel has 512 bits of memory, an enable register, a carry register and a
// leaf of the linear-expression tree, which gives A*x + B*y + C for the
// pixel's region coordinates (x, y). The IGC broadcasts one instruction per
// 40 MHz tick (`tick`) to all EMCs, which execute it in lock step (SIMD).
//
// The top 128 bits of pixel memory (bits 384..511) are the transfer buffer.
// During a transfer (`xfer_enab`) it is cut off from the processors and tied
// to the serial port: for transfer cycle `cnt` the port presents two bits of
// each of two neighbouring pixels (pixels 2j and 2j+1 on wires 0 and 1),
// starting at the most significant bit of the 64- or 128-bit transfer word,
// so pixel j of the stream is sent in full before pixel j+1. A write strobe
// from the compositor stores an incoming pair at the same position (load).
//
// The document gives the processors' resources (1-bit ALU, carry, enable,
// tree, memory, transfer buffer) and names instructions such as IGC_LOAD,
// IGC_MEMpluseqTREE, IGC_SETENABS and IGC_TREEgeZERO, but not their bit-level
// microcode. Here the arithmetic instructions act on a whole field (up to 32
// bits) in one tick, and the depth test TREEltMEM is this design's addition.
// Copies between a region buffer and the transfer buffer are bit-serial
// through the carry register (RDCARRY then WRCARRY, two ticks per bit), as in
// the 1-bit processor. Coordinates come in as the tile origin so that all
// EMCs share one module.
// Lint note: bit 0 of `cnt` (which bit of a pair is on the wire at 80 MHz) is
// not used here: the port always presents both bits of the pair.
module emc
  import pf_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,          // 40 MHz instruction strobe
  input  logic             instr_valid,
  input  emc_instr_t       instr,
  input  logic [7:0]       tile_x0,       // region x of the tile's column 0
  input  logic [7:0]       tile_y0,       // region y of the tile's row 0
  // serial transfer port
  input  logic             xfer_enab,
  input  logic [13:0]      cnt,
  input  logic             len_long,
  output logic [1:0][1:0]  port_rd,       // [pixel 2j+w][1=high,0=low]
  input  logic             port_we,
  input  logic [1:0][1:0]  port_wr
);

  logic [PIX_MEM_BITS-1:0] pmem   [EMC_PIXELS];
  logic [EMC_PIXELS-1:0]   enab;
  logic [EMC_PIXELS-1:0]   carry;

  // -------------------------------------------------- linear-expression tree
  logic signed [31:0] ax [TILE_DIM];
  logic signed [31:0] by [TILE_DIM];
  always_comb begin
    for (int i = 0; i < TILE_DIM; i++) begin
      ax[i] = instr.a * $signed({24'd0, tile_x0 + 8'(i)});
      by[i] = instr.b * $signed({24'd0, tile_y0 + 8'(i)});
    end
  end

  function automatic logic signed [31:0] tree(input int unsigned p);
    return ax[p % TILE_DIM] + by[p / TILE_DIM] + instr.c;
  endfunction

  // ---------------------------------------------------------- port indexing
  logic [6:0] pair_j;       // pixel pair
  logic [6:0] hi_bit;       // transfer-word bit presented as the high bit
  always_comb begin
    if (len_long) begin
      pair_j = cnt[13:7];
      hi_bit = 7'(PIX_LONG - 1) - {cnt[6:1], 1'b0};
    end else begin
      pair_j = cnt[12:6];      // cnt[13] is 0 in 64-bit transfers
      hi_bit = 7'(PIX_SHORT - 1) - {1'b0, cnt[5:1], 1'b0};
    end
  end

  logic [7:0] pa0, pa1;     // pixel indices of the pair
  logic [8:0] xhi, xlo;     // pixel-memory bits of the pair
  assign pa0 = {pair_j, 1'b0};
  assign pa1 = {pair_j, 1'b1};
  assign xhi = 9'(XBUF_BASE) + {2'b00, hi_bit};
  assign xlo = xhi - 9'd1;

  always_comb begin
    port_rd[0][1] = pmem[pa0][xhi];
    port_rd[0][0] = pmem[pa0][xlo];
    port_rd[1][1] = pmem[pa1][xhi];
    port_rd[1][0] = pmem[pa1][xlo];
  end

  // ------------------------------------------------------ processor array
  logic [31:0]             fmask;
  logic [PIX_MEM_BITS-1:0] wmask;
  logic                    xbuf_hit;   // instruction touches the transfer buffer
  always_comb begin
    fmask    = (instr.len >= 8'd32) ? 32'hFFFF_FFFF : ((32'd1 << instr.len) - 1);
    wmask    = PIX_MEM_BITS'(fmask) << instr.addr;
    xbuf_hit = (32'(instr.addr) + 32'(instr.len) > XBUF_BASE) ||
               (instr.op == EOP_WRCARRY && instr.addr >= 9'(XBUF_BASE));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enab  <= '1;
      carry <= '0;
    end else begin
      if (tick && instr_valid) begin
        for (int p = 0; p < EMC_PIXELS; p++) begin
          logic [31:0] field;
          field = 32'(pmem[p] >> instr.addr) & fmask;
          unique case (instr.op)
            EOP_SETENABS:   enab[p] <= 1'b1;
            EOP_TREEGEZERO: enab[p] <= enab[p] & ~tree(p)[31];
            EOP_TREELTMEM:  enab[p] <= enab[p] &
                                       ($signed({tree(p)[31], tree(p)}) < $signed({1'b0, field}));
            EOP_RDCARRY:    carry[p] <= pmem[p][instr.addr];
            default: ;
          endcase
        end
      end
    end
  end

  // pixel memory: processor writes and serial-port writes
  always_ff @(posedge clk) begin
    if (tick && instr_valid && !(xfer_enab && xbuf_hit)) begin
      for (int p = 0; p < EMC_PIXELS; p++) begin
        logic [31:0] field;
        field = 32'(pmem[p] >> instr.addr) & fmask;
        unique case (instr.op)
          EOP_LOAD:
            if (enab[p])
              pmem[p] <= (pmem[p] & ~wmask) |
                         ((PIX_MEM_BITS'(tree(p)) << instr.addr) & wmask);
          EOP_MEMPLUSEQTREE:
            if (enab[p])
              pmem[p] <= (pmem[p] & ~wmask) |
                         ((PIX_MEM_BITS'(field + tree(p)) << instr.addr) & wmask);
          EOP_WRCARRY:
            pmem[p][instr.addr] <= carry[p];
          default: ;
        endcase
      end
    end
    if (xfer_enab && port_we) begin
      pmem[pa0][xhi]     <= port_wr[0][1];
      pmem[pa0][xlo] <= port_wr[0][0];
      pmem[pa1][xhi]     <= port_wr[1][1];
      pmem[pa1][xlo] <= port_wr[1][0];
    end
  end

endmodule
