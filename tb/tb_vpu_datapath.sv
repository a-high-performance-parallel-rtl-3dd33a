// tb_vpu_datapath: one vector unit with two behavioural FPUs, run through
// the image-processing sequence it exists for. Two rows of 8-bit pixels are
// streamed in through the input FIFO and unpacked to floats in register
// files A and B; C = A - B is computed on the alternating FPUs; the result
// is packed back to 8-bit pixels (negative differences clamp to 0); C is
// moved to A (the float difference, sign included); C = A + B is computed
// and packed to 16-bit pixels, which must give the first row back. Every
// output word is checked, as are the one-element-per-cycle vector rate, the
// strict alternation between the FPUs, a few scalar register accesses and
// one instruction fetch and one data read through the caches.
module tb_vpu_datapath;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int LAT = 4, N = 64;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic rst;
  vpu_in_t ctl, vi;
  vpu_out_t o;
  vpu_datapath #(.CWORDS(256)) dut (.clk, .rst, .i(vi), .o);

  logic [1:0] rv; logic [31:0] r0, r1;
  fpu_model #(.LAT(LAT)) f0 (.clk, .valid(o.fpu_valid[0]), .op(o.fpu_op), .a(o.fpu_a), .b(o.fpu_b), .rvalid(rv[0]), .r(r0));
  fpu_model #(.LAT(LAT)) f1 (.clk, .valid(o.fpu_valid[1]), .op(o.fpu_op), .a(o.fpu_a), .b(o.fpu_b), .rvalid(rv[1]), .r(r1));

  // cache refill model: memory word at address a is a*5+7
  logic ifv, dfv; logic [31:0] ifd, dfd;
  always_comb begin
    vi = ctl;
    vi.fpu_rvalid = rv; vi.fpu_r0 = r0; vi.fpu_r1 = r1;
    vi.ic_fill_valid = ifv; vi.ic_fill_data = ifd;
    vi.dc_fill_valid = dfv; vi.dc_fill_data = dfd;
  end
  initial begin
    ifv = 0; ifd = 0;
    forever begin
      @(posedge clk);
      if (o.ic_fill_req && !rst) begin
        logic [27:0] a; a = o.ic_fill_addr;
        repeat (3) @(negedge clk);
        for (int k = 0; k < 4; k++) begin ifv = 1; ifd = 32'(a + 28'(k)) * 5 + 7; @(negedge clk); end
        ifv = 0;
      end
    end
  end
  initial begin
    dfv = 0; dfd = 0;
    forever begin
      @(posedge clk);
      if (o.dc_fill_req && !rst) begin
        logic [27:0] a; a = o.dc_fill_addr;
        repeat (3) @(negedge clk);
        for (int k = 0; k < 4; k++) begin dfv = 1; dfd = 32'(a + 28'(k)) * 5 + 7; @(negedge clk); end
        dfv = 0;
      end
    end
  end

  int checks = 0, failures = 0, n0 = 0, n1 = 0;
  logic [1:0] last_fpu = 2'b10;
  always @(posedge clk) if (!rst) begin
    if (o.fpu_valid != 0) begin
      if (o.fpu_valid == last_fpu || o.fpu_valid == 2'b11) begin failures++; $display("FAIL FPU did not alternate"); end
      last_fpu = o.fpu_valid;
    end
    if (o.fpu_valid[0]) n0++;
    if (o.fpu_valid[1]) n1++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] p [N], q [N];

  task automatic pfu(input logic [2:0] m, input int n, input int src, input int dst, input logic db);
    @(negedge clk);
    ctl.p_start = 1; ctl.p_mode = m; ctl.p_count = 12'(n); ctl.p_src = 11'(src); ctl.p_dst = 11'(dst); ctl.p_dst_b = db;
    @(negedge clk); ctl.p_start = 0;
  endtask

  task automatic stream_in(input logic [7:0] px [N]);
    for (int w = 0; w < N / 4; w++) begin
      @(negedge clk);
      while (!o.mem_in_ready) begin ctl.mem_in_valid = 0; @(negedge clk); end
      ctl.mem_in_valid = 1; ctl.mem_in_word = {px[4*w+3], px[4*w+2], px[4*w+1], px[4*w]};
    end
    @(negedge clk); ctl.mem_in_valid = 0;
  endtask

  task automatic vop(input logic [3:0] op);
    int t0, t1;
    @(negedge clk);
    ctl.v_start = 1; ctl.v_op = op; ctl.v_count_x = 12'(N); ctl.v_count_y = 12'd1;
    ctl.a_base = 0; ctl.a_sx = 1; ctl.a_sy = 0; ctl.b_base = 0; ctl.b_sx = 1; ctl.b_sy = 0;
    ctl.c_base = 0; ctl.c_sx = 1; ctl.c_sy = 0;
    t0 = $time / 25;
    @(negedge clk); ctl.v_start = 0;
    while (!o.v_done) @(negedge clk);
    t1 = $time / 25;
    checks++;
    if (t1 - t0 > N + LAT + 4) begin failures++; $display("FAIL vector of %0d took %0d cycles", N, t1 - t0); end
  endtask

  // collect `words` output words, popping each
  task automatic collect(input int words, output logic [31:0] got [$]);
    got = {};
    while (got.size() < words) begin
      @(negedge clk);
      ctl.mem_out_pop = 0;
      if (o.mem_out_valid) begin got.push_back(o.mem_out_word); ctl.mem_out_pop = 1; end
    end
    @(negedge clk); ctl.mem_out_pop = 0;
  endtask

  initial begin
    logic [31:0] got [$];
    rst = 1; ctl = '0;
    for (int k = 0; k < N; k++) begin p[k] = 8'($urandom); q[k] = 8'($urandom); end
    repeat (3) @(posedge clk); #1 rst = 0;

    // scalar registers: two writes, read back
    @(negedge clk); ctl.s_we0 = 1; ctl.s_wa0 = 6'd5; ctl.s_wd0 = 32'h1234_5678;
    ctl.s_we1 = 1; ctl.s_wa1 = 6'd63; ctl.s_wd1 = 32'hCAFE_0001;
    @(negedge clk); ctl.s_we0 = 0; ctl.s_we1 = 0; ctl.s_ra0 = 6'd5; ctl.s_ra1 = 6'd63;
    #1 checks++;
    if (o.s_rd0 !== 32'h1234_5678 || o.s_rd1 !== 32'hCAFE_0001) begin failures++; $display("FAIL scalar regs"); end

    // unpack p into A[0..63] and q into B[0..63]
    pfu(3'd0, N, 0, 0, 1'b0); stream_in(p); while (o.p_busy) @(negedge clk);
    pfu(3'd0, N, 0, 0, 1'b1); stream_in(q); while (o.p_busy) @(negedge clk);
    // C = A - B, pack to 8 bits
    n0 = 0; n1 = 0;
    vop(4'd2);
    checks++;
    if (n0 != N / 2 || n1 != N / 2) begin failures++; $display("FAIL FPU shares %0d/%0d", n0, n1); end
    pfu(3'd3, N, 0, 0, 1'b0);
    collect(N / 4, got);
    for (int k = 0; k < N; k++) begin
      logic [7:0] e; e = (p[k] > q[k]) ? p[k] - q[k] : 8'd0;
      checks++;
      if (got[k / 4][8 * (k % 4) +: 8] !== e) begin failures++; $display("FAIL pack8 %0d: %h exp %h", k, got[k / 4][8 * (k % 4) +: 8], e); end
    end
    // A = C, C = A + B, pack to 16 bits
    pfu(3'd6, N, 0, 0, 1'b0); while (o.p_busy) @(negedge clk);
    vop(4'd0);
    pfu(3'd4, N, 0, 0, 1'b0);
    collect(N / 2, got);
    for (int k = 0; k < N; k++) begin
      logic [15:0] e; e = 16'(p[k]);   // (p - q) + q, the float difference kept its sign
      checks++;
      if (got[k / 2][16 * (k % 2) +: 16] !== e) begin failures++; $display("FAIL pack16 %0d: %h exp %h p %h q %h", k, got[k / 2][16 * (k % 2) +: 16], e, p[k], q[k]); end
    end

    // one instruction fetch and one data read (both miss, then refill)
    @(negedge clk); while (!o.ic_ready) @(negedge clk);
    ctl.ic_req = 1; ctl.ic_addr = 28'h123;
    @(negedge clk); ctl.ic_req = 0;
    while (!o.ic_rvalid) @(negedge clk);
    checks++;
    if (o.ic_rdata !== 32'h123 * 5 + 7) begin failures++; $display("FAIL ifetch %h", o.ic_rdata); end
    @(negedge clk); while (!o.dc_ready) @(negedge clk);
    ctl.dc_req = 1; ctl.dc_we = 0; ctl.dc_addr = 28'h456;
    @(negedge clk); ctl.dc_req = 0;
    while (!o.dc_rvalid) @(negedge clk);
    checks++;
    if (o.dc_rdata !== 32'h456 * 5 + 7) begin failures++; $display("FAIL dread %h", o.dc_rdata); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
