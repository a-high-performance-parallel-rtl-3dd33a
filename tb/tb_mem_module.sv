// tb_mem_module: byte-masked writes and reads of a memory module against an
// array model, with the one-cycle read latency.
module tb_mem_module;
  timeunit 1ns; timeprecision 1ps;
  localparam int DB = 10;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic en, we;
  logic [3:0] bmask;
  logic [DB-1:0] addr;
  logic [31:0] wdata, rdata;
  mem_module #(.DEPTH_BITS(DB)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] m [2**DB];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; bmask = 0; addr = 0; wdata = 0;
    for (int k = 0; k < 2**DB; k++) begin
      @(negedge clk); en = 1; we = 1; bmask = 4'hF; addr = DB'(k); wdata = $urandom; m[k] = wdata;
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      en = 1; we = $urandom_range(1); addr = DB'($urandom); bmask = 4'($urandom); wdata = $urandom;
      if (we) begin
        for (int b = 0; b < 4; b++) if (bmask[b]) m[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        logic [31:0] e; e = m[addr];
        @(negedge clk); en = 0;
        checks++;
        if (rdata !== e) begin failures++; $display("FAIL addr %0d: %h exp %h", addr, rdata, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
