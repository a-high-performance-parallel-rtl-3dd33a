// tb_bbi: one scan-conversion interface (slice ID 2 of four) against a Z
// and colour memory held in the testbench. Random spans are sent, with and
// without the Z test; every write the BBI makes is compared with the pixel
// worked out here from the span (Gouraud colour and depth stepped per
// pixel, only pixels whose x mod 4 equals the slice ID), pixels that fail
// the Z test must not be written, and each span must take no more than two
// cycles per pixel plus a small fixed cost (10 Mpixel/s per BBI at 20 MHz).
module tb_bbi;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int ID = 2, COLS = 16, ROWS = 8, N = COLS * ROWS;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic rst, span_valid, ready, d_re, d_we;
  span_t span;
  logic [6:0] d_addr;
  logic [31:0] d_color, pixels_written, pixels_hidden;
  logic [23:0] d_z, d_zq;
  bbi #(.ID(ID), .COLS(COLS), .ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] zm [N];
  logic [31:0] cm [N];
  always_ff @(posedge clk) begin
    if (d_re) d_zq <= zm[d_addr];
    if (d_we) begin zm[d_addr] <= d_z; cm[d_addr] <= d_color; end
  end

  // expected memory after each span
  logic [23:0] ez [N];
  logic [31:0] ec [N];
  int exp_w = 0, exp_h = 0;
  bit cleared = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input span_t s_in);
    int n, cyc;
    @(negedge clk);
    span = s_in; span_valid = 1;
    @(negedge clk); span_valid = 0;
    // reference
    n = 0;
    for (int j = 0; j < s_in.len; j++) begin
      int xx; logic [31:0] z; logic [15:0] r, g, b; int a;
      xx = s_in.x0 + j;
      if (xx % 4 != ID) continue;
      n++;
      z = s_in.z + 32'(j) * s_in.dz;
      r = s_in.r + 16'(j) * s_in.dr; g = s_in.g + 16'(j) * s_in.dg; b = s_in.b + 16'(j) * s_in.db;
      a = s_in.y * COLS + xx / 4;
      if (!s_in.ztest || z[31:8] < ez[a]) begin
        ez[a] = z[31:8]; ec[a] = {s_in.alpha, r[15:8], g[15:8], b[15:8]}; exp_w++;
      end else exp_h++;
    end
    cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > 2 * n + 3) begin failures++; $display("FAIL span of %0d own pixels took %0d cycles", n, cyc); end
    for (int k = 0; k < N && cleared; k++) begin
      checks++;
      if (zm[k] !== ez[k] || cm[k] !== ec[k]) begin
        failures++; $display("FAIL addr %0d z %h/%h c %h/%h", k, zm[k], ez[k], cm[k], ec[k]);
      end
    end
    checks += 2;
    if (pixels_written != 32'(exp_w)) begin failures++; $display("FAIL written %0d exp %0d", pixels_written, exp_w); end
    if (pixels_hidden  != 32'(exp_h)) begin failures++; $display("FAIL hidden %0d exp %0d", pixels_hidden, exp_h); end
  endtask

  initial begin
    span_t s;
    rst = 1; span_valid = 0; span = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // clear: one unconditional span per line covering every pixel
    for (int y = 0; y < ROWS; y++) begin
      s = '0; s.x0 = 0; s.len = 11'(COLS * 4); s.y = 10'(y); s.z = 32'hFFFFFF00; s.alpha = 8'h00;
      send(s);
    end
    cleared = 1;
    for (int t = 0; t < 300; t++) begin
      s = '0;
      s.x0 = 11'($urandom_range(COLS * 4 - 1));
      s.len = 11'($urandom_range(COLS * 4 - s.x0));
      s.y = 10'($urandom_range(ROWS - 1));
      s.ztest = (t % 7 != 0);
      s.z = $urandom; s.dz = 32'($signed(16'($urandom)));
      s.r = 16'($urandom); s.g = 16'($urandom); s.b = 16'($urandom);
      s.dr = 16'($urandom_range(600)) - 16'd300; s.dg = 16'($urandom); s.db = 16'd256;
      s.alpha = 8'($urandom);
      send(s);
    end
    checks++;
    if (exp_h == 0) begin failures++; $display("FAIL no pixel was hidden by the Z test"); end
    $display("pixels written %0d hidden %0d", exp_w, exp_h);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
