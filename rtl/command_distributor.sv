// command_distributor: hands each span from the polygon pipelines to all
// four BBIs.
//
// A span is accepted (`in_ready`) only when the previous one has been taken
// by every BBI. It is then offered to each BBI until that BBI's `ready` is
// seen; a BBI that is still busy with an earlier, longer span keeps its
// copy pending while the others move on. So the BBIs work independently and
// the slowest one sets the pace only one span deep. The document shows the
// distributor between the pipelines and the BBIs without describing it;
// this broadcast with per-BBI acceptance is this design's choice.
module command_distributor
  import uwgsp4_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  span_t        in_span,
  output logic         in_ready,
  output logic [N-1:0] out_valid,
  output span_t        out_span,
  input  logic [N-1:0] out_ready,
  output logic [15:0]  waits        // cycles a span waited for a busy BBI
);
  logic [N-1:0] pending;

  assign in_ready  = (pending == '0);
  assign out_valid = pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending  <= '0;
      out_span <= '0;
      waits    <= '0;
    end else begin
      if (in_ready && in_valid) begin
        pending  <= '1;
        out_span <= in_span;
      end else begin
        pending <= pending & ~out_ready;
        if ((pending & ~out_ready) != '0) waits <= waits + 1'b1;
      end
    end
  end
endmodule
