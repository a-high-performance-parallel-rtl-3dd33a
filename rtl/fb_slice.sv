// fb_slice: the frame-buffer and Z-buffer memory owned by one BBI.
//
// The screen is 1280 x 1024. The four BBIs split it by column: slice s holds
// every pixel with x mod 4 = s, at address (y, x / 4). Each slice holds two
// colour buffers of 32-bit pixels (24-bit colour plus 8 bits for
// transparency and blending) and one 24-bit Z-buffer, matching the
// document's 2 x 1280 x 1024 x 32 double frame buffer and 1280 x 1024 x 24
// Z-buffer in total. The column interleave is this design's choice.
//
// Drawing port (BBI): `d_re` reads Z and the colour of the back buffer
// (the one `front` does not select) at d_addr; the data appear the next
// cycle. `d_we` writes colour and Z at d_addr in the back buffer.
// Video port: `v_re` reads the front buffer at v_addr, data next cycle.
// The VRAMs of the original have a serial video port; this synchronous
// model gives it one read per cycle.
module fb_slice #(
  parameter int unsigned COLS = 320,      // 1280 / 4
  parameter int unsigned ROWS = 1024
) (
  input  logic                          clk,
  input  logic                          front,     // buffer being displayed
  input  logic                          d_re,
  input  logic                          d_we,
  input  logic [$clog2(COLS*ROWS)-1:0]  d_addr,
  input  logic [31:0]                   d_color,
  input  logic [23:0]                   d_z,
  output logic [23:0]                   d_zq,
  output logic [31:0]                   d_colorq,
  input  logic                          v_re,
  input  logic [$clog2(COLS*ROWS)-1:0]  v_addr,
  output logic [31:0]                   v_color
);
  localparam int unsigned N = COLS * ROWS;

  logic [31:0] buf0 [N];
  logic [31:0] buf1 [N];
  logic [23:0] zbuf [N];

  always_ff @(posedge clk) begin
    if (d_re) begin
      d_zq     <= zbuf[d_addr];
      d_colorq <= front ? buf0[d_addr] : buf1[d_addr];
    end
    if (d_we) begin
      zbuf[d_addr] <= d_z;
      if (front) buf0[d_addr] <= d_color;
      else       buf1[d_addr] <= d_color;
    end
    if (v_re) v_color <= front ? buf1[v_addr] : buf0[v_addr];
  end
endmodule
