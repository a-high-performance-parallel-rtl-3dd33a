// tb_workload_conv5x5: a 5 x 5 convolution run on one vector unit, the
// imaging workload the system is rated on, at a size that simulates
// quickly: a 12 x 12 tile of 8-bit pixels gives an 8 x 8 output tile.
//
// The tile is unpacked into register file A (row pitch 12) and the 25
// weights, already in float form, into register file B with UNPACK32. For
// each tap the 2-D address generators read the shifted 8 x 8 window of A
// (element stride 1, row stride 12) and the tap's weight from B (strides 0,
// so it is repeated), and C = A * w is computed. The first product becomes
// the accumulator (moved to B); every later product is moved to A and added
// to the accumulator. The sum is packed back to 8-bit pixels and compared
// with a reference that rounds to single precision after every operation
// in the same order, so the comparison is exact. The cycle count per tap is
// printed, together with what it implies for a 512 x 512 image on sixteen
// units, and every vector operation must run at one element per cycle.
module tb_workload_conv5x5;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  import fp32_pkg::*;
  localparam int LAT = 4, T = 12, O = 8, NO = O * O;
  localparam int ACC = 1024, PROD = 1536, WB = 2000;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic rst;
  vpu_in_t ctl, vi;
  vpu_out_t o;
  vpu_datapath #(.CWORDS(256)) dut (.clk, .rst, .i(vi), .o);

  logic [1:0] rv; logic [31:0] r0, r1;
  fpu_model #(.LAT(LAT)) f0 (.clk, .valid(o.fpu_valid[0]), .op(o.fpu_op), .a(o.fpu_a), .b(o.fpu_b), .rvalid(rv[0]), .r(r0));
  fpu_model #(.LAT(LAT)) f1 (.clk, .valid(o.fpu_valid[1]), .op(o.fpu_op), .a(o.fpu_a), .b(o.fpu_b), .rvalid(rv[1]), .r(r1));
  always_comb begin
    vi = ctl;
    vi.fpu_rvalid = rv; vi.fpu_r0 = r0; vi.fpu_r1 = r1;
    vi.ic_fill_valid = 1'b0; vi.ic_fill_data = '0; vi.dc_fill_valid = 1'b0; vi.dc_fill_data = '0;
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pfu(input logic [2:0] m, input int n, input int src, input int dst, input logic db);
    @(negedge clk);
    ctl.p_start = 1; ctl.p_mode = m; ctl.p_count = 12'(n); ctl.p_src = 11'(src); ctl.p_dst = 11'(dst); ctl.p_dst_b = db;
    @(negedge clk); ctl.p_start = 0;
  endtask

  task automatic stream_in(input logic [31:0] w [$]);
    foreach (w[k]) begin
      @(negedge clk);
      while (!o.mem_in_ready) begin ctl.mem_in_valid = 0; @(negedge clk); end
      ctl.mem_in_valid = 1; ctl.mem_in_word = w[k];
    end
    @(negedge clk); ctl.mem_in_valid = 0;
  endtask

  task automatic vop(input logic [3:0] op, input int ab, input int asx, input int asy,
                     input int bb, input int bsx, input int bsy);
    int t0, t1;
    @(negedge clk);
    ctl.v_start = 1; ctl.v_op = op; ctl.v_count_x = 12'(O); ctl.v_count_y = 12'(O);
    ctl.a_base = 11'(ab); ctl.a_sx = 11'(asx); ctl.a_sy = 11'(asy);
    ctl.b_base = 11'(bb); ctl.b_sx = 11'(bsx); ctl.b_sy = 11'(bsy);
    ctl.c_base = 0; ctl.c_sx = 1; ctl.c_sy = 11'(O);
    t0 = $time / 25;
    @(negedge clk); ctl.v_start = 0;
    while (!o.v_done) @(negedge clk);
    t1 = $time / 25;
    checks++;
    if (t1 - t0 > NO + LAT + 4) begin failures++; $display("FAIL vector of %0d took %0d cycles", NO, t1 - t0); end
  endtask

  task automatic move(input int dst, input logic db);
    pfu(3'd6, NO, 0, dst, db);
    while (o.p_busy) @(negedge clk);
  endtask

  initial begin
    logic [7:0]  px [T][T];
    logic [31:0] w [25];
    logic [31:0] acc [O][O];
    logic [31:0] words [$];
    int t0, t1;
    rst = 1; ctl = '0;
    for (int y = 0; y < T; y++) for (int x = 0; x < T; x++) px[y][x] = 8'($urandom);
    for (int k = 0; k < 25; k++) w[k] = r2f(real'($urandom_range(1000)) / 25000.0 * 1.9);
    repeat (3) @(posedge clk); #1 rst = 0;

    // load the tile and the weights
    t0 = $time / 25;
    words = {};
    for (int k = 0; k < T * T / 4; k++)
      words.push_back({px[(4*k+3)/T][(4*k+3)%T], px[(4*k+2)/T][(4*k+2)%T], px[(4*k+1)/T][(4*k+1)%T], px[(4*k)/T][(4*k)%T]});
    pfu(3'd0, T * T, 0, 0, 1'b0); stream_in(words); while (o.p_busy) @(negedge clk);
    words = {};
    for (int k = 0; k < 25; k++) words.push_back(w[k]);
    pfu(3'd2, 25, 0, WB, 1'b1); stream_in(words); while (o.p_busy) @(negedge clk);

    // 25 taps
    t1 = $time / 25;
    for (int k = 0; k < 25; k++) begin
      int dy, dx;
      dy = k / 5; dx = k % 5;
      vop(4'd1, dy * T + dx, 1, T, WB + k, 0, 0);            // C = window * w[k]
      if (k == 0) move(ACC, 1'b1);
      else begin
        move(PROD, 1'b0);
        vop(4'd0, PROD, 1, O, ACC, 1, O);                    // C = product + accumulator
        if (k != 24) move(ACC, 1'b1);
      end
      for (int y = 0; y < O; y++) for (int x = 0; x < O; x++) begin
        logic [31:0] p;
        p = r2f(real'(px[y + dy][x + dx]) * f2r(w[k]));   // unpacking is exact
        acc[y][x] = (k == 0) ? p : r2f(f2r(p) + f2r(acc[y][x]));
      end
    end
    $display("25 taps on an %0dx%0d tile: %0d cycles (load %0d)", O, O, $time / 25 - t1, t1 - t0);
    $display("at this rate one unit does %0.1f cycles per output pixel; 512x512 on 16 units at 40 MHz: %0.1f ms",
             real'($time / 25 - t1) / NO, real'($time / 25 - t1) / NO * 512.0 * 512.0 / 16.0 / 40.0e6 * 1000.0);

    // pack and check
    pfu(3'd3, NO, 0, 0, 1'b0);
    for (int k = 0; k < NO / 4; k++) begin
      @(negedge clk);
      while (!o.mem_out_valid) @(negedge clk);
      for (int l = 0; l < 4; l++) begin
        int n, e; real v;
        n = 4 * k + l;
        v = f2r(acc[n / O][n % O]);
        e = (v <= 0.0) ? 0 : (v >= 255.0) ? 255 : int'($floor(v + 0.5));
        checks++;
        if (o.mem_out_word[8*l +: 8] !== 8'(e)) begin
          failures++; $display("FAIL out %0d,%0d: %0d exp %0d (%f)", n % O, n / O, o.mem_out_word[8*l +: 8], e, v);
        end
      end
      ctl.mem_out_pop = 1; @(negedge clk); ctl.mem_out_pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
