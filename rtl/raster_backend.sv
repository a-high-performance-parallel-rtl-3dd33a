// raster_backend: the drawing and display half of the graphics subsystem.
//
// Spans from the polygon processing pipelines enter the command
// distributor, which gives each span to all four BBIs. BBI s draws the
// pixels with x mod 4 = s into its own frame-buffer/Z-buffer slice, always
// into the back buffer. The video refresh reads the front buffer of the
// four slices in turn and swaps the buffers at vertical blank when asked.
// The cursor generator, overlay buffer and RAMDACs of the original sit
// after `rgb` and are not part of this block.
module raster_backend
  import uwgsp4_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned V_ACTIVE = 1024,
  parameter int unsigned H_BLANK  = 408,
  parameter int unsigned V_BLANK  = 42
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        span_valid,
  input  span_t       span,
  output logic        span_ready,
  input  logic        swap_req,
  output logic        swap_done,
  output logic        front,
  output logic        de, hsync, vsync,
  output logic [23:0] rgb,
  output logic [15:0] frames,
  output logic [31:0] pixels_written [4],
  output logic [31:0] pixels_hidden  [4],
  output logic [15:0] dist_waits,
  output logic [3:0]  bbi_idle
);
  localparam int unsigned COLS = H_ACTIVE / 4;
  localparam int unsigned AW   = $clog2(COLS * V_ACTIVE);

  logic [3:0]  sv, sr;
  span_t       ds;
  logic [3:0]  v_re;
  logic [AW-1:0] v_addr;
  logic [31:0] v_color [4];

  command_distributor #(.N(4)) u_dist (
    .clk, .rst, .in_valid(span_valid), .in_span(span), .in_ready(span_ready),
    .out_valid(sv), .out_span(ds), .out_ready(sr), .waits(dist_waits));

  for (genvar i = 0; i < 4; i++) begin : g_bbi
    logic          d_re, d_we;
    logic [AW-1:0] d_addr;
    logic [31:0]   d_color, d_colorq;
    logic [23:0]   d_z, d_zq;
    bbi #(.ID(i), .COLS(COLS), .ROWS(V_ACTIVE)) u_bbi (
      .clk, .rst, .span_valid(sv[i]), .span(ds), .ready(sr[i]),
      .d_re, .d_we, .d_addr, .d_color, .d_z, .d_zq,
      .pixels_written(pixels_written[i]), .pixels_hidden(pixels_hidden[i]));
    fb_slice #(.COLS(COLS), .ROWS(V_ACTIVE)) u_fb (
      .clk, .front, .d_re, .d_we, .d_addr, .d_color, .d_z, .d_zq, .d_colorq,
      .v_re(v_re[i]), .v_addr, .v_color(v_color[i]));
  end

  assign bbi_idle = sr;

  video_refresh #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .H_BLANK(H_BLANK), .V_BLANK(V_BLANK)) u_video (
    .clk, .rst, .swap_req, .swap_done, .front, .v_re, .v_addr, .v_color,
    .de, .hsync, .vsync, .rgb, .frames);
endmodule
