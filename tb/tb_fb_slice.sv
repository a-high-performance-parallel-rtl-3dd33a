// tb_fb_slice: drives the drawing port and the video port of one frame
// buffer slice at random, flips the front buffer now and then, and checks
// every read against a model of the two colour buffers and the Z buffer:
// drawing goes to the back buffer, video reads the front buffer, and the Z
// buffer is shared.
module tb_fb_slice;
  timeunit 1ns; timeprecision 1ps;
  localparam int COLS = 8, ROWS = 4, N = COLS * ROWS;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic front, d_re, d_we, v_re;
  logic [4:0] d_addr, v_addr;
  logic [31:0] d_color, d_colorq, v_color;
  logic [23:0] d_z, d_zq;
  fb_slice #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] b0 [N], b1 [N];
  logic [23:0] zb [N];
  logic [23:0] ez; logic [31:0] ec, ev;
  logic cd = 0, cv = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    front = 0; d_re = 0; d_we = 0; v_re = 0; d_addr = 0; v_addr = 0; d_color = 0; d_z = 0;
    // initialise both buffers through the drawing port
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk); front = f[0]; d_we = 1; d_addr = 5'(k);
        d_color = $urandom; d_z = 24'($urandom);
        zb[k] = d_z; if (front) b0[k] = d_color; else b1[k] = d_color;
      end
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (cd) begin
        checks += 2;
        if (d_zq !== ez) begin failures++; $display("FAIL zq %h exp %h", d_zq, ez); end
        if (d_colorq !== ec) begin failures++; $display("FAIL colorq %h exp %h", d_colorq, ec); end
      end
      if (cv) begin
        checks++;
        if (v_color !== ev) begin failures++; $display("FAIL v_color %h exp %h", v_color, ev); end
      end
      if (t % 97 == 0) front = ~front;
      d_re = $urandom_range(1); d_we = $urandom_range(1); v_re = $urandom_range(1);
      d_addr = 5'($urandom_range(N - 1)); v_addr = 5'($urandom_range(N - 1));
      d_color = $urandom; d_z = 24'($urandom);
      ez = zb[d_addr]; ec = front ? b0[d_addr] : b1[d_addr]; cd = d_re;
      ev = front ? b1[v_addr] : b0[v_addr]; cv = v_re;
      if (d_we) begin
        zb[d_addr] = d_z;
        if (front) b0[d_addr] = d_color; else b1[d_addr] = d_color;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
