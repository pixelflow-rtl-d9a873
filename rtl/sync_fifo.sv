// sync_fifo: synchronous first-in first-out buffer.
//
// Used for the rasterizer's two command FIFOs (RFIFO and TFIFO: 1K entries of
// 36-bit control words, the document's sizes) and for the graphics
// processor's 1024-word message receive FIFO. The head entry is visible on
// `dout` whenever `empty` is low (first-word fall-through); `pop` removes it
// at the clock edge, `push` appends `din`. A push when full or a pop when
// empty is ignored, and an assertion reports it. `count` is the fill level.
// The storage is a plain array, one write and one read port.
module sync_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_q, rd_q;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      count <= '0;
    end else begin
      if (do_push) wr_q <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      if (do_pop)  rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din;
  end

  assign dout  = mem[rd_q];
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  // overflow and underflow are producer/consumer errors
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");

endmodule
