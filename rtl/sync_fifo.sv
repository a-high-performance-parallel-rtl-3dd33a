// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the FIFO between the memory bus and the pixel formatter of a
// vector unit, and as the upstream word buffer of a port controller. The
// document names the FIFO; its depth and this interface are this design's
// choices. A push when full and a pop when empty are ignored (and flagged by
// the assertions). `dout` shows the oldest entry whenever `count` is
// non-zero; a pop removes it at the clock edge. Push and pop may coincide.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd, wr;
  logic             do_push, do_pop;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd    <= '0;
      wr    <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        mem[wr] <= din;
        wr      <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      end
      if (do_pop) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + (do_push ? 1'b1 : 1'b0) - (do_pop ? 1'b1 : 1'b0);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(pop && empty));
endmodule
