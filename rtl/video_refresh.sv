// video_refresh: screen refresh from the double-buffered frame buffer.
//
// A raster counter walks H_ACTIVE x V_ACTIVE visible pixels plus H_BLANK
// and V_BLANK blanking cycles and lines. For every visible pixel it reads
// the front buffer of slice x mod 4 at (y, x / 4) and presents the 24-bit
// colour one cycle later with `de` high. A buffer swap requested with
// `swap_req` takes effect at the start of the next vertical blanking
// interval, so a frame is never shown half old and half new (the smooth
// animation the double buffer is for); `swap_done` pulses then and `front`
// tells which buffer is displayed. Blanking lengths and the swap rule are
// this design's choices; the document gives the resolution, the 24-bit
// colour and the double buffer. One pixel per clock is modelled; the
// pixel-clock rate and the VRAM serial ports are not.
module video_refresh #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned V_ACTIVE = 1024,
  parameter int unsigned H_BLANK  = 408,
  parameter int unsigned V_BLANK  = 42,
  parameter int unsigned COLS     = H_ACTIVE / 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        swap_req,
  output logic        swap_done,
  output logic        front,
  output logic [3:0]  v_re,
  output logic [$clog2(COLS*V_ACTIVE)-1:0] v_addr,
  input  logic [31:0] v_color [4],
  output logic        de,
  output logic        hsync,
  output logic        vsync,
  output logic [23:0] rgb,
  output logic [15:0] frames
);
  localparam int unsigned HT = H_ACTIVE + H_BLANK;
  localparam int unsigned VT = V_ACTIVE + V_BLANK;

  logic [$clog2(HT)-1:0] hc;
  logic [$clog2(VT)-1:0] vc;
  logic                  pending, vis, de_q;
  logic [1:0]            sl_q;

  assign vis    = (hc < H_ACTIVE) && (vc < V_ACTIVE);
  assign v_addr = ($bits(v_addr))'(vc) * ($bits(v_addr))'(COLS) + ($bits(v_addr))'(hc >> 2);

  always_comb begin
    v_re = '0;
    v_re[hc[1:0]] = vis;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0; vc <= '0; front <= 1'b0; pending <= 1'b0; swap_done <= 1'b0;
      de_q <= 1'b0; sl_q <= '0; frames <= '0;
    end else begin
      swap_done <= 1'b0;
      if (swap_req) pending <= 1'b1;
      if (hc == HT - 1) begin
        hc <= '0;
        if (vc == VT - 1) vc <= '0;
        else              vc <= vc + 1'b1;
        if (vc == V_ACTIVE - 1) begin
          frames <= frames + 1'b1;
          if (pending || swap_req) begin
            front     <= ~front;
            pending   <= 1'b0;
            swap_done <= 1'b1;
          end
        end
      end else begin
        hc <= hc + 1'b1;
      end
      de_q <= vis;
      sl_q <= hc[1:0];
    end
  end

  assign de    = de_q;
  assign rgb   = de_q ? v_color[sl_q][23:0] : 24'h0;
  assign hsync = (hc >= H_ACTIVE);
  assign vsync = (vc >= V_ACTIVE);
endmodule
