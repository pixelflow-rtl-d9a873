// tb_ready_go_ctrl: three ready/go controllers in a chain (a master followed
// by two slaves) with a frame-buffer ready source at the downstream end.
// Checks that ready reaches the master only when every board and the frame
// buffer are ready (each board can veto), that the master then raises go,
// that go reaches each slave exactly one cycle after the previous board, that
// the master drops go on `xfer_done` and the slaves follow one cycle apart,
// and that no new transfer starts until the boards are ready again.
module tb_ready_go_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 3;
  logic [N-1:0] xfer_ready, ready_out, go_out, xgo;
  logic [N:0]   ready;          // ready[i] enters board i from downstream
  logic         fb_ready, done;

  assign ready[N] = fb_ready;

  for (genvar i = 0; i < N; i++) begin : g
    ready_go_ctrl u (
      .clk, .rst_n, .master(i == 0), .xfer_ready(xfer_ready[i]),
      .ready_in(ready[i+1]), .ready_out(ready_out[i]),
      .go_in(i == 0 ? 1'b0 : go_out[(i == 0) ? 0 : i-1]), .go_out(go_out[i]),
      .xfer_go(xgo[i]), .xfer_done(i == 0 ? done : 1'b0)
    );
    if (i > 0) begin : g_r
      assign ready[i] = ready_out[i];
    end
  end
  assign ready[0] = ready_out[0];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t_go [N];
  initial begin
    xfer_ready = '0; fb_ready = 0; done = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      // boards become ready one by one; the last one to become ready is random
      int order [N];
      for (int i = 0; i < N; i++) order[i] = i;
      order.shuffle();
      fb_ready = 1;
      for (int k = 0; k < N; k++) begin
        repeat (5) @(posedge clk);
        #1 check(go_out[0] == 0, "no go before all ready");
        xfer_ready[order[k]] = 1;
      end
      // ready travels up: one cycle per slave, then the master acts
      for (int c = 0; c < 10 && !go_out[0]; c++) @(posedge clk);
      #1 check(go_out[0] == 1 && xgo[0] == 1, "master raised go");
      t_go[0] = $time;
      @(posedge clk); #1 check(go_out[1] && xgo[1], "go reached slave 1 after one cycle");
      @(posedge clk); #1 check(go_out[2] && xgo[2], "go reached slave 2 after one cycle");
      // rasterizers drop XferReady when go arrives
      xfer_ready = '0;
      fb_ready = 0;
      repeat (20) @(posedge clk);
      #1 check(&go_out, "go held during transfer");
      done = 1; @(posedge clk); #1 done = 0;
      check(go_out[0] == 0, "master dropped go on done");
      @(posedge clk); #1 check(go_out[1] == 0 && go_out[2] == 1, "slave 1 follows first");
      @(posedge clk); #1 check(go_out[2] == 0, "slave 2 follows");
      repeat (10) @(posedge clk);
      #1 check(go_out == '0, "no new transfer without ready");
    end
    // veto by the frame buffer alone
    xfer_ready = '1; fb_ready = 0;
    repeat (20) @(posedge clk);
    #1 check(go_out == '0, "frame buffer vetoes");
    fb_ready = 1;
    repeat (5) @(posedge clk);
    #1 check(go_out[0] == 1, "go after frame buffer ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
