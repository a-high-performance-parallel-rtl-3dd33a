// tb_icache: random instruction fetches over a region larger than the
// cache, served from a memory model. Checks every returned word, that a
// repeated fetch hits (one-cycle answer, no refill), that conflicting lines
// evict each other (direct mapping) and that hits and misses are counted.
module tb_icache;
  timeunit 1ns; timeprecision 1ps;
  localparam int AW = 28, WORDS = 256, LINE = 4;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic flush, req, ready, rvalid, fill_req, fill_valid;
  logic [AW-1:0] addr, fill_addr;
  logic [31:0] rdata, fill_data;
  logic [15:0] hits, misses;
  icache #(.ADDR_W(AW), .WORDS(WORDS), .LINE(LINE)) dut (.*);

  int checks = 0, failures = 0, fills = 0;
  function automatic logic [31:0] memv(input logic [AW-1:0] a); return 32'(a) * 32'h9E3779B1 + 5; endfunction

  // refill model: answers a fill request after 3 cycles with LINE words
  initial begin
    fill_valid = 0; fill_data = 0;
    forever begin
      @(posedge clk);
      if (fill_req && !rst) begin
        logic [AW-1:0] a; a = fill_addr; fills++;
        repeat (3) @(negedge clk);
        for (int k = 0; k < LINE; k++) begin
          fill_valid = 1; fill_data = memv(a + AW'(k)); @(negedge clk);
        end
        fill_valid = 0;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fetch(input logic [AW-1:0] a, output int cycles);
    int t0;
    @(negedge clk); while (!ready) @(negedge clk);
    req = 1; addr = a; t0 = $time / 25;
    @(negedge clk); req = 0;
    while (!rvalid) @(negedge clk);
    cycles = $time / 25 - t0;
    checks++;
    if (rdata !== memv(a)) begin failures++; $display("FAIL addr %h: %h exp %h", a, rdata, memv(a)); end
  endtask

  initial begin
    int c, f0;
    flush = 0; req = 0; addr = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 500; t++) fetch(AW'($urandom_range(1023)) + 28'h100000, c);
    // a hit is answered in one cycle without a refill
    fetch(28'h5000, c); f0 = fills;
    fetch(28'h5001, c);
    checks++; if (c != 1 || fills != f0) begin failures++; $display("FAIL hit took %0d cycles", c); end
    // same index, other tag: evicts
    fetch(28'h5000 + WORDS, c);
    fetch(28'h5002, c);
    checks++; if (c == 1) begin failures++; $display("FAIL conflicting line not evicted"); end
    // flush empties the cache
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    f0 = fills; fetch(28'h5002, c);
    checks++; if (fills == f0) begin failures++; $display("FAIL flush kept the line"); end
    checks++; if (hits == 0 || misses == 0) begin failures++; $display("FAIL counters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
