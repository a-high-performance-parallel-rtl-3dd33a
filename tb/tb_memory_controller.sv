// tb_memory_controller: sends row-vector commands to one memory controller
// with its four memory modules, as a port controller would. Checks write
// and byte-masked data by reading back, that each word lands in module
// (address mod 4), the one-word-per-cycle rate, and that refresh bursts
// happen and stall the stream.
module tb_memory_controller;
  timeunit 1ns; timeprecision 1ps;
  import uwgsp4_pkg::*;
  localparam int MB = 10, SEG = 9;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  xreq_t xin; xrsp_t xout;
  logic [3:0] m_en; logic m_we; logic [3:0] m_bmask; logic [MB-1:0] m_addr;
  logic [31:0] m_wdata, m_rdata [4];
  logic [15:0] refresh_count;
  memory_controller #(.MOD_BITS(MB), .SEG_BITS(SEG), .REFRESH_PERIOD(100), .REFRESH_CYCLES(4)) dut (.*);
  for (genvar k = 0; k < 4; k++) begin : g_mod
    mem_module #(.DEPTH_BITS(MB)) u (.clk, .en(m_en[k]), .we(m_we), .bmask(m_bmask), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata[k]));
  end

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [int];
  logic [31:0] got [$];
  int mod_hits [4];

  always @(posedge clk) if (xout.rvalid) got.push_back(xout.data);
  always @(posedge clk) for (int k = 0; k < 4; k++) if (m_en[k]) mod_hits[k]++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hold a word until the controller takes it
  task automatic send(input x_kind_e k, input logic we, input logic [3:0] bm, input logic [31:0] d);
    xin = '0; xin.kind = k; xin.we = we; xin.bmask = bm; xin.data = d;
    @(posedge clk); while (!xout.ready) @(posedge clk);
    #1 xin = '0;
  endtask

  task automatic access(input logic we, input logic [3:0] bm, input int a, input int n, output int cycles);
    int t0;
    got = {};
    t0 = $time / 25;
    send(XK_ADDR, we, bm, 32'(a));
    send(XK_LEN, 0, 0, 32'(n));
    for (int i = 0; i < n && we; i++) begin
      logic [31:0] v; v = $urandom;
      send(XK_WDATA, 0, 0, v);
      if (!ref_mem.exists(a+i)) ref_mem[a+i] = 0;
      for (int b = 0; b < 4; b++) if (bm[b]) ref_mem[a+i][8*b +: 8] = v[8*b +: 8];
    end
    while (!xout.done) @(posedge clk);
    cycles = $time / 25 - t0;
    @(posedge clk); #1;
    if (!we) begin
      checks++;
      if (got.size() != n) begin failures++; $display("FAIL %0d words read, %0d expected", got.size(), n); end
      for (int i = 0; i < n && i < got.size(); i++) begin
        checks++;
        if (got[i] !== ref_mem[a+i]) begin failures++; $display("FAIL word %0d: %h exp %h", a+i, got[i], ref_mem[a+i]); end
      end
    end
  endtask

  initial begin
    int c;
    xin = '0;
    for (int k = 0; k < 4; k++) mod_hits[k] = 0;
    repeat (2) @(negedge clk); rst = 0;
    access(1, 4'hF, 0, 64, c);
    access(0, 4'hF, 0, 64, c);
    checks++;
    if (c > 64 + 8 + 4) begin failures++; $display("FAIL 64-word read took %0d cycles", c); end
    checks++;
    if (mod_hits[0] != 32 || mod_hits[1] != 32 || mod_hits[2] != 32 || mod_hits[3] != 32) begin
      failures++; $display("FAIL module use %0d %0d %0d %0d", mod_hits[0], mod_hits[1], mod_hits[2], mod_hits[3]);
    end
    access(1, 4'b1001, 10, 20, c);
    access(0, 4'hF, 5, 40, c);
    // addresses in a higher row of segments (controller bits ignored)
    access(1, 4'hF, 3 * 4096 + 100, 30, c);
    access(0, 4'hF, 3 * 4096 + 100, 30, c);
    access(1, 4'hF, 200, 300, c);
    access(0, 4'hF, 200, 300, c);
    checks++;
    if (refresh_count < 3) begin failures++; $display("FAIL only %0d refreshes", refresh_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
