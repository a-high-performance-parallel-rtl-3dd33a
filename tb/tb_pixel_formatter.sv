// tb_pixel_formatter: unpacks 8- and 16-bit pixel words into A/B and checks
// each float bit-exactly against an independent conversion; packs floats
// from C (including negative, fractional and too-large values) and checks
// the packed words; moves C to B; checks the one-element-per-cycle rate of
// unpacking.
module tb_pixel_formatter;
  import fp32_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int AW = 11;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic start, busy, done, dst_b, in_valid, in_ready, out_valid, ab_we, ab_sel_b, c_re;
  logic [2:0] mode;
  logic [AW:0] count;
  logic [AW-1:0] src_base, dst_base, ab_waddr, c_raddr;
  logic [31:0] in_word, out_word, ab_wdata, c_rdata;
  pixel_formatter dut (.*);

  logic [31:0] A [2048], B [2048], C [2048];
  always @(posedge clk) begin
    if (ab_we && !ab_sel_b) A[ab_waddr] <= ab_wdata;
    if (ab_we &&  ab_sel_b) B[ab_waddr] <= ab_wdata;
    if (c_re) c_rdata <= C[c_raddr];
  end

  int checks = 0, failures = 0;
  logic [31:0] words [$];
  logic [31:0] outs  [$];
  always @(posedge clk) if (out_valid) outs.push_back(out_word);

  // input stream from a queue, valid with random gaps
  bit no_gaps = 0;
  always @(negedge clk) begin
    in_valid = words.size() > 0 && (no_gaps || $urandom_range(3) != 0);
    in_word  = words.size() > 0 ? words[0] : 32'h0;
  end
  always @(posedge clk) if (in_valid && in_ready) void'(words.pop_front());

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_u2f(input int v);
    return r2f(real'(v));
  endfunction

  function automatic int ref_f2u(input logic [31:0] f, input int maxv);
    real r; int v;
    r = f2r(f);
    if (r != r || r < 0.5) return 0;           // NaN, negative, below one half
    if (r >= real'(maxv) + 0.5) return maxv;
    v = int'($floor(r + 0.5));
    return v > maxv ? maxv : v;
  endfunction

  task automatic cmd(input logic [2:0] m, input int n, input int src, input int dst, input logic db);
    @(negedge clk);
    start = 1; mode = m; count = (AW+1)'(n); src_base = AW'(src); dst_base = AW'(dst); dst_b = db;
    @(negedge clk); start = 0;
    wait (done); @(negedge clk); @(negedge clk);
  endtask

  initial begin
    int t0, t1, pix [$];
    start = 0; mode = 0; count = 0; src_base = 0; dst_base = 0; dst_b = 0;
    repeat (2) @(negedge clk); rst = 0;

    // UNPACK8: 37 pixels into A at 100
    pix = {};
    for (int k = 0; k < 40; k++) pix.push_back($urandom_range(255));
    pix[0] = 0; pix[1] = 255; pix[2] = 1;
    for (int w = 0; w < 10; w++) words.push_back({8'(pix[4*w+3]), 8'(pix[4*w+2]), 8'(pix[4*w+1]), 8'(pix[4*w])});
    cmd(0, 37, 0, 100, 0);
    for (int k = 0; k < 37; k++) begin
      checks++;
      if (A[100+k] !== ref_u2f(pix[k])) begin failures++; $display("FAIL u8 %0d: %h exp %h", k, A[100+k], ref_u2f(pix[k])); end
    end
    words = {};

    // UNPACK16 into B at 7, with no gaps: rate check
    pix = {};
    for (int k = 0; k < 64; k++) pix.push_back($urandom_range(65535));
    pix[5] = 65535;
    for (int w = 0; w < 32; w++) words.push_back({16'(pix[2*w+1]), 16'(pix[2*w])});
    no_gaps = 1;
    @(negedge clk);
    start = 1; mode = 1; count = 64; dst_base = 7; dst_b = 1; t0 = $time / 25;
    @(negedge clk); start = 0;
    wait (done); t1 = $time / 25; @(negedge clk);
    no_gaps = 0;
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (B[7+k] !== ref_u2f(pix[k])) begin failures++; $display("FAIL u16 %0d: %h exp %h", k, B[7+k], ref_u2f(pix[k])); end
    end
    checks++;
    if (t1 - t0 > 64 + 3) begin failures++; $display("FAIL unpack of 64 took %0d cycles", t1 - t0); end

    // PACK8 from C at 300: values around the edges
    for (int k = 0; k < 23; k++) begin
      real v;
      case (k % 6)
        0: v = -3.0; 1: v = 0.49; 2: v = 0.5; 3: v = 254.6; 4: v = 1.0e6; default: v = real'($urandom_range(2550)) / 10.0;
      endcase
      C[300+k] = r2f(v);
    end
    outs = {};
    cmd(3, 23, 300, 0, 0);
    checks++;
    if (outs.size() != 6) begin failures++; $display("FAIL pack8 words %0d", outs.size()); end
    for (int k = 0; k < 23 && outs.size() == 6; k++) begin
      checks++;
      if (int'(outs[k/4][8*(k%4) +: 8]) != ref_f2u(C[300+k], 255)) begin
        failures++; $display("FAIL pack8 %0d: %0d exp %0d", k, outs[k/4][8*(k%4) +: 8], ref_f2u(C[300+k], 255));
      end
    end

    // PACK16
    for (int k = 0; k < 10; k++) C[400+k] = r2f(real'($urandom_range(140000)) / 2.0);
    outs = {};
    cmd(4, 10, 400, 0, 0);
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (outs.size() != 5 || int'(outs[k/2][16*(k%2) +: 16]) != ref_f2u(C[400+k], 65535)) begin
        failures++; $display("FAIL pack16 %0d", k);
      end
    end

    // MOVE C -> B
    for (int k = 0; k < 30; k++) C[600+k] = $urandom;
    cmd(6, 30, 600, 900, 1);
    for (int k = 0; k < 30; k++) begin
      checks++;
      if (B[900+k] !== C[600+k]) begin failures++; $display("FAIL move %0d", k); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
