// pf_pkg: types and constants shared by the PixelFlow image-composition RTL.
//
// The numbers here are the prototype's: 80 enhanced memory chips (EMCs) of
// 256 pixels per renderer/shader board, a 160x128-pixel screen region tiled as
// 10x8 EMC tiles of 16x16 pixels, 512 bits of memory per pixel whose top 128
// bits form the transfer buffer, 64- or 128-bit pixels on the composition
// network, and four region buffers in pixel memory. The instruction-word
// layout, the opcode values and the tile mapping are this design's own
// choices; the document names the commands but does not give their encoding.
// Lint note: the helper functions take 32-bit `int` arguments for ease of
// use and keep only the bits their fields hold, and the decoders look at the
// class bits of a whole instruction word; the remaining argument bits are
// unused by design. TILE_COLS documents the region width (10 tiles) and is
// used by the boards' elaboration check on NCHIP.
package pf_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned EMC_PIXELS    = 256;   // pixels per EMC
  localparam int unsigned TILE_DIM      = 16;    // EMC tile is 16x16 pixels
  localparam int unsigned EMCS_PER_BOARD = 80;   // 160x128 region
  localparam int unsigned TILE_ROWS     = 8;     // 128 / 16
  localparam int unsigned TILE_COLS     = 10;    // 160 / 16
  localparam int unsigned PIX_MEM_BITS  = 512;   // pixel memory per pixel
  localparam int unsigned XBUF_BITS     = 128;   // transfer buffer (max)
  localparam int unsigned XBUF_BASE     = PIX_MEM_BITS - XBUF_BITS; // 384
  localparam int unsigned MAX_BUFFS     = 4;     // region buffers in pixel memory
  localparam int unsigned PIX_SHORT     = 64;    // short pixel (bits)
  localparam int unsigned PIX_LONG      = 128;   // long pixel (bits)
  // 80 MHz cycles for one region: 128 pixel pairs per compositor chip
  localparam int unsigned XFER_CYC_SHORT = (EMC_PIXELS / 2) * PIX_SHORT; // 8192
  localparam int unsigned XFER_CYC_LONG  = (EMC_PIXELS / 2) * PIX_LONG;  // 16384

  // -------------------------------------------------------- compositor modes
  typedef enum logic [1:0] {
    MODE_COMPOSITE = 2'd0,   // merge EMC streams with upstream streams
    MODE_LOAD_FWD  = 2'd1,   // load upstream streams into EMC, forward them
    MODE_UNLOAD    = 2'd2,   // send EMC streams, ignore upstream
    MODE_IDLE      = 2'd3    // drive zeros (no transfer role)
  } comp_mode_e;

  // Compositor configuration register (loaded by IGC_COMP_CONFIG)
  typedef struct packed {
    logic       master;      // ready/go controller is the chain master
    logic       port_write;  // EMC serial port direction: 1 = write (load)
    comp_mode_e mode;
  } comp_cfg_t;

  // ------------------------------------------------------------ IGC commands
  // Instruction word [31:0]:
  //   [31:29] class (the three-bit field seen by the stream parser)
  //   [28:26] EMC operation (class CLS_RENDER*)
  //   [25:17] pixel-memory bit address
  //   [16:9]  field length in bits
  //   [8]     flag: copy direction for REGION_COPY (1 = transfer buffer to
  //           memory), long pixels for COMP_LEN
  //   [3:0]   configuration for COMP_CONFIG: {master, port_write, mode}
  typedef enum logic [2:0] {
    CLS_RENDER0      = 3'd0,  // rendering command without operands
    CLS_RENDER3      = 3'd1,  // rendering command followed by A, B, C
    CLS_REGION_DONE  = 3'd2,
    CLS_REGION_COPY  = 3'd3,
    CLS_REGION_XFER  = 3'd4,
    CLS_COMP_CONFIG  = 3'd5,
    CLS_COMP_LEN     = 3'd6,
    CLS_NOP          = 3'd7
  } cmd_class_e;

  typedef enum logic [2:0] {
    EOP_NOP          = 3'd0,
    EOP_SETENABS     = 3'd1,  // enable every pixel
    EOP_TREEGEZERO   = 3'd2,  // enable &= (Ax+By+C >= 0)
    EOP_LOAD         = 3'd3,  // field = Ax+By+C where enabled
    EOP_MEMPLUSEQTREE= 3'd4,  // field += Ax+By+C where enabled
    EOP_TREELTMEM    = 3'd5,  // enable &= (Ax+By+C < field)  (depth test)
    EOP_RDCARRY      = 3'd6,  // carry = memory bit  (bit-serial copy, read)
    EOP_WRCARRY      = 3'd7   // memory bit = carry  (bit-serial copy, write)
  } emc_op_e;

  // One instruction broadcast by the IGC to every EMC of the array
  typedef struct packed {
    emc_op_e            op;
    logic [8:0]         addr;
    logic [7:0]         len;
    logic signed [31:0] a;
    logic signed [31:0] b;
    logic signed [31:0] c;
  } emc_instr_t;

  // A complete command as assembled by the stream parser
  typedef struct packed {
    logic [31:0] iword;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
  } igc_cmd_t;

  function automatic cmd_class_e cmd_class(input logic [31:0] w);
    return cmd_class_e'(w[31:29]);
  endfunction

  // Number of operand words that follow an instruction word
  function automatic int unsigned cmd_operands(input logic [31:0] w);
    return (w[31:29] == CLS_RENDER3) ? 3 : 0;
  endfunction

  function automatic logic [31:0] mk_iword(input cmd_class_e cls, input emc_op_e op,
                                           input int unsigned addr, input int unsigned len,
                                           input logic flag, input logic [3:0] cfg);
    logic [31:0] w;
    w = '0;
    w[31:29] = cls;
    w[28:26] = op;
    w[25:17] = addr[8:0];
    w[16:9]  = len[7:0];
    w[8]     = flag;
    w[3:0]   = cfg;
    return w;
  endfunction

  // RFIFO/TFIFO control word: {VRAM word address, block length in words}
  localparam int unsigned VRAM_AW = 21;   // 8 Mbytes of 32-bit words
  localparam int unsigned CTRL_LW = 15;   // up to 16K words per block
  typedef struct packed {
    logic [VRAM_AW-1:0] addr;
    logic [CTRL_LW-1:0] len;
  } ctrl_word_t;                          // 36 bits

endpackage
