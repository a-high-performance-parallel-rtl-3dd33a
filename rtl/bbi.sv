// bbi: bit-blit interpolator, one of four scan-conversion engines. It fills
// the pixels of horizontal spans with Gouraud-shaded colour, doing the
// Z-buffer hidden-surface test, in the frame-buffer slice it owns.
//
// A span (span_t) covers x0 .. x0+len-1 on line y. Every BBI receives every
// span and draws only its own pixels, those with x mod 4 = ID, so the four
// together draw four pixels per cycle. Depth and colour are linear along the
// span: at pixel x they are z + (x - x0) * dz and likewise for r, g, b
// (fixed point: z 24.8, colour 8.8). The BBI computes its first pixel's
// values with one multiply and then steps by four times the deltas.
//
// Each pixel is a read-modify-write of the Z-buffer taking two cycles: in
// the first the stored Z of the back buffer is read; in the second the new
// Z is compared and, if the new pixel is nearer (smaller Z) or `ztest` is
// off, colour {alpha, r, g, b} and Z are written. A span of L pixels takes
// about 2 * L/4 + 2 cycles, i.e. the four BBIs draw two pixels per cycle;
// clocked at 20 MHz (an assumption) that is the document's 40 Mpixel/s. `ready` is high when the BBI can take a
// new span. The document gives the BBI's duties (scan conversion with
// hidden-surface removal, 40 Mpixel/s for the four) but not its insides;
// this arithmetic and interleave are this design's choices. The other BBI
// features the document lists (block transfer, transparency, antialiasing,
// texture mapping, window-tagged Z) are not built.
module bbi
  import uwgsp4_pkg::*;
#(
  parameter int unsigned ID   = 0,
  parameter int unsigned COLS = 320,
  parameter int unsigned ROWS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        span_valid,
  input  span_t       span,
  output logic        ready,
  // frame-buffer slice
  output logic        d_re,
  output logic        d_we,
  output logic [$clog2(COLS*ROWS)-1:0] d_addr,
  output logic [31:0] d_color,
  output logic [23:0] d_z,
  input  logic [23:0] d_zq,
  output logic [31:0] pixels_written,
  output logic [31:0] pixels_hidden
);
  localparam int unsigned AW = $clog2(COLS*ROWS);

  logic        busy;
  span_t       s;
  logic [10:0] x;            // current own pixel
  logic [11:0] left;         // own pixels still to do
  logic [31:0] z, zstep;
  logic [15:0] r, g, b, rstep, gstep, bstep;

  // stage 2 registers
  logic          p_valid, p_ztest;
  logic [AW-1:0] p_addr;
  logic [23:0]   p_z;
  logic [31:0]   p_color;

  function automatic logic [AW-1:0] addr_of(input logic [9:0] yy, input logic [10:0] xx);
    return AW'(yy) * AW'(COLS) + AW'(xx >> 2);
  endfunction

  assign ready  = !busy;
  assign d_re   = busy && !p_valid && left != 0;
  assign d_addr = p_valid ? p_addr : addr_of(s.y, x);   // write in stage 2, else read
  assign d_we   = p_valid && (!p_ztest || p_z < d_zq);
  assign d_color = p_color;
  assign d_z     = p_z;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; s <= '0; x <= '0; left <= '0;
      z <= '0; zstep <= '0; r <= '0; g <= '0; b <= '0; rstep <= '0; gstep <= '0; bstep <= '0;
      p_valid <= 1'b0; p_ztest <= 1'b0; p_addr <= '0; p_z <= '0; p_color <= '0;
      pixels_written <= '0; pixels_hidden <= '0;
    end else begin
      if (p_valid) begin
        if (d_we) pixels_written <= pixels_written + 1'b1;
        else      pixels_hidden  <= pixels_hidden + 1'b1;
      end
      p_valid <= 1'b0;
      if (!busy) begin
        if (span_valid) begin
          logic [1:0]  k0;
          logic [11:0] n;
          k0 = 2'(ID) - span.x0[1:0];            // offset of the first own pixel
          n  = (span.len > 11'(k0)) ? 12'((span.len - 11'(k0) + 11'd3) >> 2) : 12'd0;
          s     <= span;
          x     <= span.x0 + 11'(k0);
          left  <= n;
          busy  <= (n != 0);
          z     <= span.z + 32'(k0) * span.dz;
          r     <= span.r + 16'(k0) * span.dr;
          g     <= span.g + 16'(k0) * span.dg;
          b     <= span.b + 16'(k0) * span.db;
          zstep <= span.dz << 2;
          rstep <= span.dr << 2;
          gstep <= span.dg << 2;
          bstep <= span.db << 2;
        end
      end else if (!p_valid && left != 0) begin
        // stage 1: read issued this cycle, write next cycle
        p_valid <= 1'b1;
        p_ztest <= s.ztest;
        p_addr  <= addr_of(s.y, x);
        p_z     <= z[31:8];
        p_color <= {s.alpha, r[15:8], g[15:8], b[15:8]};
        x    <= x + 11'd4;
        z    <= z + zstep;
        r    <= r + rstep;
        g    <= g + gstep;
        b    <= b + bstep;
        left <= left - 1'b1;
      end else if (!p_valid && left == 0) begin
        busy <= 1'b0;
      end
    end
  end
endmodule
