// tb_emc: self-checking test of one EMC (256 pixel processors).
//
// Runs a small z-buffer style program and reads the results back through the
// serial transfer port, computing the expected value of every pixel here from
// its coordinates: initialise a field, enable by an edge function
// (TREEgeZERO), load Ax+By+C where enabled, add a second expression
// (MEMpluseqTREE), depth-test against a constant (TREEltMEM), then copy 64
// bits into the transfer buffer bit-serially through the carry register and
// scan all 8,192 port cycles. Then writes a random image into the transfer
// buffer through the port (load), checks that processor writes to the
// transfer buffer are blocked during a transfer, and reads it back as 128-bit
// pixels.
module tb_emc;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick, instr_valid, xfer_enab, len_long, port_we;
  emc_instr_t instr;
  logic [7:0] tile_x0, tile_y0;
  logic [13:0] cnt;
  logic [1:0][1:0] port_rd, port_wr;

  emc dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input emc_op_e o, input int addr, input int len,
                    input int a = 0, input int b = 0, input int c = 0);
    @(negedge clk);
    instr = '{op: o, addr: 9'(addr), len: 8'(len), a: a, b: b, c: c};
    instr_valid = 1; tick = 1;
    @(negedge clk);
    instr_valid = 0; tick = 0;
  endtask

  // read every pixel's transfer word through the port
  logic [127:0] rd_word [256];
  task automatic scan(input logic lng);
    int L;
    L = lng ? 128 : 64;
    len_long = lng;
    for (int c = 0; c < 128 * L; c++) begin
      int j, b;
      @(negedge clk);
      xfer_enab = 1; cnt = 14'(c);
      j = c / L; b = c % L;
      #1;
      if (!b[0]) begin
        rd_word[2*j][L-1-b]   = port_rd[0][1];
        rd_word[2*j][L-2-b]   = port_rd[0][0];
        rd_word[2*j+1][L-1-b] = port_rd[1][1];
        rd_word[2*j+1][L-2-b] = port_rd[1][0];
      end
    end
    @(negedge clk); xfer_enab = 0;
  endtask

  logic [31:0]  f   [256];   // expected field at bits 0..31
  logic [31:0]  g   [256];   // expected field at bits 32..63
  logic         en  [256];
  logic [127:0] img [256];

  initial begin
    int x, y, t;
    tick = 0; instr_valid = 0; xfer_enab = 0; len_long = 0; port_we = 0;
    instr = '0; cnt = 0; port_wr = '0;
    tile_x0 = 8'd48; tile_y0 = 8'd96;
    repeat (3) @(posedge clk); rst_n = 1;

    op(EOP_SETENABS, 0, 0);
    op(EOP_LOAD, 0, 32, 0, 0, 32'h0000_0DEA);
    op(EOP_LOAD, 32, 32, 2, -1, 1000);
    op(EOP_TREEGEZERO, 0, 0, 1, 1, -(48 + 96 + 12));     // x + y >= 156
    op(EOP_LOAD, 0, 32, 3, 7, 100);
    op(EOP_MEMPLUSEQTREE, 0, 32, -1, 2, 5);
    op(EOP_TREELTMEM, 0, 32, 0, 0, 1300);                // enable &= 1300 < field
    op(EOP_LOAD, 32, 32, 0, 0, 32'h5555_0000);
    for (int p = 0; p < 256; p++) begin
      x = 48 + p % 16; y = 96 + p / 16;
      g[p] = 32'(2 * x - y + 1000);
      en[p] = (x + y >= 156);
      f[p] = en[p] ? 32'(3 * x + 7 * y + 100 - x + 2 * y + 5) : 32'h0DEA;
      en[p] = en[p] && (1300 < f[p]);
      if (en[p]) g[p] = 32'h5555_0000;
    end
    for (int i = 0; i < 64; i++) begin
      op(EOP_RDCARRY, i, 1);
      op(EOP_WRCARRY, XBUF_BASE + i, 1);
    end
    scan(1'b0);
    for (int p = 0; p < 256; p++) begin
      checks++;
      if (rd_word[p][63:0] !== {g[p], f[p]}) begin
        failures++;
        if (failures < 8) $display("pixel %0d: got %h exp %h", p, rd_word[p][63:0], {g[p], f[p]});
      end
    end

    // load a random image through the port, 128-bit pixels
    for (int p = 0; p < 256; p++) img[p] = {$urandom, $urandom, $urandom, $urandom};
    len_long = 1;
    for (int c = 0; c < 128 * 128; c += 2) begin
      int j, b;
      j = c / 128; b = c % 128;
      @(negedge clk);
      xfer_enab = 1; cnt = 14'(c + 1); port_we = 1;
      port_wr[0] = {img[2*j][127-b], img[2*j][126-b]};
      port_wr[1] = {img[2*j+1][127-b], img[2*j+1][126-b]};
      // the processors try to overwrite the transfer buffer meanwhile
      if (c == 1000) begin instr = '{op: EOP_LOAD, addr: 9'(XBUF_BASE), len: 8'd32,
                                     a: 0, b: 0, c: 0}; instr_valid = 1; tick = 1; end
      else begin instr_valid = 0; tick = 0; end
    end
    @(negedge clk); port_we = 0; xfer_enab = 0; instr_valid = 0; tick = 0;
    scan(1'b1);
    t = 0;
    for (int p = 0; p < 256; p++) begin
      checks++;
      if (rd_word[p] !== img[p]) begin
        failures++;
        if (t++ < 5) $display("load pixel %0d: got %h exp %h", p, rd_word[p], img[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
