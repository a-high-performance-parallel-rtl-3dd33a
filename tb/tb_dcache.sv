// tb_dcache: random reads and writes over a region larger than the cache,
// with a memory model behind the refill and write-through ports. Checks
// every read against the model, that each write reaches memory, that a
// line survives one conflicting line (two ways) and that the least recently
// used way is the one replaced.
module tb_dcache;
  timeunit 1ns; timeprecision 1ps;
  localparam int AW = 28, WORDS = 256, LINE = 4, SETS = WORDS / LINE / 2;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic req, we, ready, rvalid, fill_req, fill_valid, mem_we;
  logic [AW-1:0] addr, fill_addr, mem_addr;
  logic [31:0] wdata, rdata, fill_data, mem_wdata;
  logic [15:0] hits, misses;
  dcache #(.ADDR_W(AW), .WORDS(WORDS), .LINE(LINE)) dut (.*);

  int checks = 0, failures = 0, fills = 0;
  logic [31:0] mem [int];
  function automatic logic [31:0] memv(input int a); return mem.exists(a) ? mem[a] : 32'(a) ^ 32'h5A5A0000; endfunction

  always @(posedge clk) if (mem_we) mem[int'(mem_addr)] = mem_wdata;

  initial begin
    fill_valid = 0; fill_data = 0;
    forever begin
      @(posedge clk);
      if (fill_req && !rst) begin
        int a; a = int'(fill_addr); fills++;
        repeat (2) @(negedge clk);
        for (int k = 0; k < LINE; k++) begin fill_valid = 1; fill_data = memv(a + k); @(negedge clk); end
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

  task automatic access(input logic w, input int a, input logic [31:0] d, output int cycles);
    int t0; logic [31:0] e;
    @(negedge clk); while (!ready) @(negedge clk);
    e = memv(a);
    req = 1; we = w; addr = AW'(a); wdata = d; t0 = $time / 25;
    @(negedge clk); req = 0;
    if (!w) begin
      while (!rvalid) @(negedge clk);
      checks++;
      if (rdata !== e) begin failures++; $display("FAIL read %0d: %h exp %h", a, rdata, e); end
    end else begin
      @(negedge clk);
      checks++;
      if (memv(a) !== d) begin failures++; $display("FAIL write-through %0d", a); end
    end
    cycles = $time / 25 - t0;
  endtask

  initial begin
    int c, f0, base;
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 800; t++) access($urandom_range(2) == 0, $urandom_range(1023), $urandom, c);
    // two ways: lines A and B of one set both stay; C then replaces the LRU one (A)
    base = 4096;
    access(0, base, 0, c);                        // A
    access(0, base + SETS * LINE, 0, c);          // B, same set
    access(0, base, 0, c);                        // A hit, B becomes LRU
    checks++; if (c != 1) begin failures++; $display("FAIL A evicted by B"); end
    access(0, base + 2 * SETS * LINE, 0, c);      // C replaces B
    f0 = fills;
    access(0, base, 0, c);
    checks++; if (fills != f0) begin failures++; $display("FAIL A was replaced instead of LRU B"); end
    access(0, base + SETS * LINE, 0, c);
    checks++; if (fills == f0) begin failures++; $display("FAIL B still cached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
