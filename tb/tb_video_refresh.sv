// tb_video_refresh: a small screen (8 x 4 active, 3 and 2 blank) with the
// four frame buffer slices modelled here as two buffers each. Every
// displayed pixel is checked against the front buffer, the frame period
// against the raster totals, and buffer swaps must take effect only once a
// frame, at the end of the last active line, and be reported by swap_done.
module tb_video_refresh;
  timeunit 1ns; timeprecision 1ps;
  localparam int HA = 8, VA = 4, HB = 3, VB = 2, COLS = HA / 4, HT = HA + HB, VT = VA + VB;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic rst, swap_req, swap_done, front, de, hsync, vsync;
  logic [3:0] v_re;
  logic [2:0] v_addr;
  logic [31:0] v_color [4];
  logic [23:0] rgb;
  logic [15:0] frames;
  video_refresh #(.H_ACTIVE(HA), .V_ACTIVE(VA), .H_BLANK(HB), .V_BLANK(VB)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] fb [2][VA][HA];      // [buffer][y][x]
  always_ff @(posedge clk)
    for (int s = 0; s < 4; s++)
      if (v_re[s]) v_color[s] <= fb[~front][v_addr / COLS][v_addr % COLS * 4 + s];

  int x = 0, y = 0, cyc = 0, last_frame_cyc = -1, swaps = 0, px = 0;
  logic shown_front;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference raster position, one cycle behind the counters (de and rgb)
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (de) begin
      checks++; px++;
      if (rgb !== fb[~shown_front][y][x][23:0]) begin
        failures++; $display("FAIL pixel %0d,%0d rgb %h exp %h", x, y, rgb, fb[~shown_front][y][x][23:0]);
      end
    end
    if (swap_done) begin
      swaps++; checks++;
      if (!(x == HT - 1 && y == VA - 1)) begin failures++; $display("FAIL swap at %0d,%0d", x, y); end
    end
    // frames counter steps at the end of the last active line
    if (x == HT - 1 && y == VA - 1) begin
      if (last_frame_cyc >= 0) begin
        checks++;
        if (cyc - last_frame_cyc != HT * VT) begin failures++; $display("FAIL frame period %0d", cyc - last_frame_cyc); end
      end
      last_frame_cyc = cyc;
    end
    shown_front = front;
    if (x == HT - 1) begin x = 0; y = (y == VT - 1) ? 0 : y + 1; end else x++;
  end

  initial begin
    rst = 1; swap_req = 0;
    for (int b = 0; b < 2; b++) for (int yy = 0; yy < VA; yy++) for (int xx = 0; xx < HA; xx++) fb[b][yy][xx] = $urandom;
    repeat (3) @(posedge clk); #1 rst = 0;
    // the video counters start one cycle ahead of the reference position
    x = -1;
    repeat (2 * HT * VT + 5) @(negedge clk);
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    repeat (3 * HT * VT) @(negedge clk);
    @(negedge clk); swap_req = 1; @(negedge clk); swap_req = 0;
    repeat (2 * HT * VT) @(negedge clk);
    checks += 3;
    if (swaps != 2) begin failures++; $display("FAIL %0d swaps", swaps); end
    if (front !== 1'b0) begin failures++; $display("FAIL front after two swaps"); end
    if (px < 6 * HA * VA) begin failures++; $display("FAIL %0d pixels shown", px); end
    $display("frames %0d pixels %0d", frames, px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
