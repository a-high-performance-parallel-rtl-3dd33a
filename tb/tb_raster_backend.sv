// tb_raster_backend: the distributor, four BBIs, four frame buffer slices
// and the video refresh on a 16 x 8 screen. The back buffer is cleared,
// random Gouraud spans are drawn with the Z test on, the buffers are
// swapped and one whole displayed frame is compared with an image worked
// out here. The drawing rate must reach two pixels per cycle on long spans
// (four BBIs at two cycles per pixel: 40 Mpixel/s at 20 MHz), and ten
// 100-pixel polygons must take no more than 100 cycles each (200,000
// polygons per second at 20 MHz).
module tb_raster_backend;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int HA = 16, VA = 8, HB = 4, VB = 2;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic rst, span_valid, span_ready, swap_req, swap_done, front, de, hsync, vsync;
  span_t span;
  logic [23:0] rgb;
  logic [15:0] frames, dist_waits;
  logic [31:0] pixels_written [4], pixels_hidden [4];
  logic [3:0] bbi_idle;
  raster_backend #(.H_ACTIVE(HA), .V_ACTIVE(VA), .H_BLANK(HB), .V_BLANK(VB)) dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] ez [VA][HA];
  logic [23:0] ec [VA][HA];
  int hidden = 0, drawn = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input span_t s);
    @(negedge clk);
    span = s; span_valid = 1;
    @(posedge clk);
    while (!span_ready) @(posedge clk);
    #1 span_valid = 0;
    for (int j = 0; j < s.len; j++) begin
      logic [31:0] z; logic [15:0] r, g, b;
      z = s.z + 32'(j) * s.dz;
      r = s.r + 16'(j) * s.dr; g = s.g + 16'(j) * s.dg; b = s.b + 16'(j) * s.db;
      if (!s.ztest || z[31:8] < ez[s.y][s.x0 + j]) begin
        ez[s.y][s.x0 + j] = z[31:8]; ec[s.y][s.x0 + j] = {r[15:8], g[15:8], b[15:8]};
      end else hidden++;
      drawn++;
    end
  endtask

  task automatic drain;
    @(negedge clk);
    while (!(span_ready && bbi_idle == 4'hF)) @(negedge clk);
  endtask

  initial begin
    span_t s;
    int t0, t1, sum_w, sum_h;
    rst = 1; span_valid = 0; span = '0; swap_req = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // clear the back buffer and its depth, timing the long spans
    t0 = $time;
    for (int y = 0; y < VA; y++) begin
      s = '0; s.len = 11'(HA); s.y = 10'(y); s.z = 32'hFFFFFF00; s.r = 16'h1000;
      send(s);
    end
    drain();
    t1 = $time;
    checks++;
    // 128 pixels at two per cycle is 64 cycles; allow a few cycles per span
    if ((t1 - t0) / 25 > HA * VA / 2 + 4 * VA) begin
      failures++; $display("FAIL clearing %0d pixels took %0d cycles", HA * VA, (t1 - t0) / 25);
    end
    // polygon rate: ten 10 x 10 Gouraud squares (100 pixels each, ten spans
    // of ten); 200,000 such polygons per second at 20 MHz is 100 cycles each
    t0 = $time;
    for (int p = 0; p < 10; p++)
      for (int r = 0; r < 10; r++) begin
        s = '0; s.x0 = 11'(p % 2 * 6); s.len = 11'd10; s.y = 10'(r % VA); s.ztest = 1;
        s.z = 32'hFFFF_0000 - 32'(p) * 32'h100; s.r = 16'(p * 4000); s.dr = 16'h0100; s.g = 16'h8000; s.b = 16'(r * 1000);
        send(s);
      end
    drain();
    t1 = $time;
    checks++;
    $display("ten 100-pixel polygons in %0d cycles", (t1 - t0) / 25);
    if ((t1 - t0) / 25 > 10 * 100) begin failures++; $display("FAIL polygon rate below 200,000 per second at 20 MHz"); end
    for (int t = 0; t < 60; t++) begin
      s = '0;
      s.x0 = 11'($urandom_range(HA - 1)); s.len = 11'($urandom_range(HA - s.x0, 1));
      s.y = 10'($urandom_range(VA - 1)); s.ztest = 1;
      s.z = $urandom_range(32'h00FF_FFFF, 0) << 8; s.dz = 32'($signed(12'($urandom))) << 8;
      s.r = 16'($urandom); s.g = 16'($urandom); s.b = 16'($urandom);
      s.dr = 16'h0100; s.dg = 16'hFF00; s.db = 16'($urandom_range(255));
      s.alpha = 8'hA5;
      send(s);
    end
    drain();
    sum_w = 0; sum_h = 0;
    for (int i = 0; i < 4; i++) begin sum_w += pixels_written[i]; sum_h += pixels_hidden[i]; end
    checks += 3;
    if (sum_w + sum_h != drawn) begin failures++; $display("FAIL counted %0d pixels exp %0d", sum_w + sum_h, drawn); end
    if (sum_h != hidden) begin failures++; $display("FAIL hidden %0d exp %0d", sum_h, hidden); end
    if (dist_waits == 0) begin failures++; $display("FAIL distributor never waited"); end
    // show what was drawn
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    @(posedge clk); while (!swap_done) @(posedge clk);
    for (int y = 0; y < VA; y++)
      for (int x = 0; x < HA; x++) begin
        @(posedge clk); while (!de) @(posedge clk);
        checks++;
        if (rgb !== ec[y][x]) begin failures++; $display("FAIL pixel %0d,%0d rgb %h exp %h", x, y, rgb, ec[y][x]); end
      end
    $display("drawn %0d hidden %0d waits %0d frames %0d", drawn, hidden, dist_waits, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
