// tb_igc: the image generation controller against a list of expected EMC
// instructions.
//
// Sends a random mix of rendering commands (with and without coefficients),
// region copies in both directions with random lengths, compositor
// configuration and transfer-length commands. Every EMC instruction the IGC
// issues on a tick is compared with the expected one: a rendering command
// gives exactly one instruction with its opcode, field and coefficients; a
// copy of n bits gives n read-into-carry / write-from-carry pairs walking
// source and destination up by one bit, i.e. 2n ticks. Also checks that
// cmd_ready is low while a command is running, that configuration and length
// writes pulse once with the right value, and the copy time in ticks.
module tb_igc;
  import pf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tick, cmd_valid, cmd_ready, emc_valid, cfg_we, len_we, len_long;
  igc_cmd_t cmd;
  emc_instr_t emc_instr;
  comp_cfg_t cfg;

  igc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 40 MHz instruction strobe: every other 80 MHz cycle
  always @(posedge clk) tick <= rst_n ? ~tick : 1'b0;

  emc_instr_t exp_q [$];
  int n_ticks_used;
  always @(posedge clk) if (rst_n && emc_valid && tick) begin
    n_ticks_used++;
    if (exp_q.size() == 0) check(0, "unexpected EMC instruction");
    else begin
      check(emc_instr == exp_q[0], "EMC instruction matches");
      void'(exp_q.pop_front());
    end
  end

  int n_cfg = 0, n_len = 0;
  comp_cfg_t exp_cfg [$];
  logic exp_len [$];
  always @(posedge clk) if (rst_n) begin
    if (cfg_we) begin
      n_cfg++;
      check(exp_cfg.size() > 0 && cfg == exp_cfg[0], "configuration value");
      void'(exp_cfg.pop_front());
    end
    if (len_we) begin
      n_len++;
      check(exp_len.size() > 0 && len_long == exp_len[0], "length value");
      void'(exp_len.pop_front());
    end
  end

  task automatic send(input igc_cmd_t c);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    cmd = '0;
    check(!cmd_ready || cmd_class(c.iword) inside {CLS_COMP_CONFIG, CLS_COMP_LEN},
          "busy while a command runs");
  endtask

  initial begin
    int ncfg_exp = 0, nlen_exp = 0;
    tick = 0; cmd_valid = 0; cmd = '0; n_ticks_used = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      igc_cmd_t c;
      int kind;
      c = '0;
      kind = $urandom_range(0, 9);
      if (kind < 5) begin
        emc_op_e op;
        op = emc_op_e'($urandom_range(1, 5));
        c.iword = mk_iword((kind < 3) ? CLS_RENDER3 : CLS_RENDER0, op,
                           $urandom_range(0, 300), $urandom_range(1, 32), 1'b0, 4'd0);
        if (kind < 3) begin c.a = $urandom; c.b = $urandom; c.c = $urandom; end
        exp_q.push_back('{op: op, addr: c.iword[25:17], len: c.iword[16:9],
                          a: c.a, b: c.b, c: c.c});
        send(c);
      end else if (kind < 7) begin
        int n, base, t0;
        bit dir;
        n = $urandom_range(1, 128); base = $urandom_range(0, 250); dir = $urandom_range(0, 1);
        c.iword = mk_iword(CLS_REGION_COPY, EOP_NOP, base, n, dir, 4'd0);
        for (int i = 0; i < n; i++) begin
          exp_q.push_back('{op: EOP_RDCARRY, addr: 9'(dir ? XBUF_BASE + i : base + i), len: 8'd1,
                            a: 0, b: 0, c: 0});
          exp_q.push_back('{op: EOP_WRCARRY, addr: 9'(dir ? base + i : XBUF_BASE + i), len: 8'd1,
                            a: 0, b: 0, c: 0});
        end
        @(negedge clk);
        while (!cmd_ready) @(negedge clk);
        t0 = n_ticks_used;
        send(c);
        @(negedge clk);
        while (!cmd_ready) @(negedge clk);
        check(n_ticks_used - t0 == 2 * n, "copy takes two ticks per bit");
      end else if (kind < 9) begin
        comp_cfg_t v;
        v = comp_cfg_t'($urandom_range(0, 15));
        exp_cfg.push_back(v);
        c.iword = mk_iword(CLS_COMP_CONFIG, EOP_NOP, 0, 0, 1'b0, 4'(v));
        ncfg_exp++;
        send(c);
      end else begin
        logic v;
        v = 1'($urandom_range(0, 1));
        exp_len.push_back(v);
        c.iword = mk_iword(CLS_COMP_LEN, EOP_NOP, 0, 0, v, 4'd0);
        nlen_exp++;
        send(c);
      end
    end
    // a full 64-bit copy: 128 ticks = 256 clock cycles of 80 MHz
    begin
      igc_cmd_t c;
      int t0;
      c = '0; c.iword = mk_iword(CLS_REGION_COPY, EOP_NOP, 0, 64, 1'b0, 4'd0);
      for (int i = 0; i < 64; i++) begin
        exp_q.push_back('{op: EOP_RDCARRY, addr: 9'(i), len: 8'd1, a: 0, b: 0, c: 0});
        exp_q.push_back('{op: EOP_WRCARRY, addr: 9'(XBUF_BASE + i), len: 8'd1, a: 0, b: 0, c: 0});
      end
      send(c);
      t0 = $time;
      while (!cmd_ready) @(negedge clk);
      check(($time - t0) / 10 >= 254 && ($time - t0) / 10 <= 258, "64-bit copy in 128 ticks");
    end
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all expected instructions issued");
    check(n_cfg == ncfg_exp, "one configuration write per command");
    check(n_len == nlen_exp, "one length write per command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
