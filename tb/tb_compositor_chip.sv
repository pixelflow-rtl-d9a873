// tb_compositor_chip: self-checking test of one compositor chip.
//
// Streams random 64-bit pixels through both wires in every mode. The upstream
// pixel is offered bit-serially, MSB first; the EMC pixel as bit pairs, the
// way the EMC port presents them. Expected results are computed here without
// the bit-serial method: Composite must give the smaller of the two words
// (the first differing bit decides, the 0 wins), Load/Forward must forward the
// upstream word and hand it to the EMC pair by pair, Unload must give the EMC
// word. Pixels with equal z but different colour, and identical pixels, are
// included. The output is checked to appear exactly one cycle after its input.
module tb_compositor_chip;
  import pf_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  comp_mode_e      mode;
  logic            xfer_enab, phase, pix_start;
  logic [1:0]      net_in, net_out;
  logic [1:0][1:0] emc_rd, emc_wr;
  logic            emc_we;

  compositor_chip dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] up [2], loc [2], got [2], ldd [2];

  task automatic run_pixel(input comp_mode_e m, input logic [63:0] u0, u1, l0, l1);
    up[0] = u0; up[1] = u1; loc[0] = l0; loc[1] = l1;
    mode = m;
    for (int b = 0; b < 64; b++) begin
      @(negedge clk);
      xfer_enab = 1'b1;
      phase     = b[0];
      pix_start = (b == 0);
      for (int w = 0; w < 2; w++) begin
        net_in[w]    = up[w][63-b];
        emc_rd[w][1] = loc[w][63 - (b & ~1)];
        emc_rd[w][0] = loc[w][62 - (b & ~1)];
      end
      #1;
      if (emc_we)
        for (int w = 0; w < 2; w++) begin
          ldd[w][64-b] = emc_wr[w][1];
          ldd[w][63-b] = emc_wr[w][0];
        end
      @(posedge clk);
      #1;
      for (int w = 0; w < 2; w++) got[w][63-b] = net_out[w];
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    mode = MODE_IDLE; xfer_enab = 0; phase = 0; pix_start = 0; net_in = 0; emc_rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [63:0] u0, u1, l0, l1;
      comp_mode_e m;
      u0 = rnd64(); u1 = rnd64(); l0 = rnd64(); l1 = rnd64();
      if (n % 5 == 1) l0 = {u0[63:32], l0[31:0]};   // same z, other colour
      if (n % 7 == 2) l1 = u1;                       // identical pixels
      if (n % 11 == 3) l0 = {u0[63:40], ~u0[39], l0[38:0]};
      m = (n < 200) ? MODE_COMPOSITE : (n < 250 ? MODE_LOAD_FWD : MODE_UNLOAD);
      run_pixel(m, u0, u1, l0, l1);
      for (int w = 0; w < 2; w++) begin
        logic [63:0] exp_w;
        unique case (m)
          MODE_COMPOSITE: exp_w = (up[w] < loc[w]) ? up[w] : loc[w];
          MODE_LOAD_FWD:  exp_w = up[w];
          default:        exp_w = loc[w];
        endcase
        checks++;
        if (got[w] !== exp_w) begin
          failures++;
          if (failures < 10)
            $display("mode %0d wire %0d: up %h loc %h got %h exp %h", m, w, up[w], loc[w], got[w], exp_w);
        end
        if (m == MODE_LOAD_FWD) begin
          checks++;
          if (ldd[w] !== up[w]) begin
            failures++;
            $display("load wire %0d: got %h exp %h", w, ldd[w], up[w]);
          end
        end
      end
    end
    // idle: nothing is sent outside a transfer
    @(negedge clk); xfer_enab = 0; net_in = 2'b11; emc_rd = '1;
    @(posedge clk); #1;
    checks++;
    if (net_out !== 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
