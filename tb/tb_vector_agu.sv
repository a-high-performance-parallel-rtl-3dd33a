// tb_vector_agu: loads 2-D patterns (unit stride, strided, negative row
// step, single column) and compares every address and the `last` flag with
// the formula base + i*stride_x + j*stride_y modulo 2048, stepping with
// random stalls.
module tb_vector_agu;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic load, step, valid, last;
  logic [10:0] base, stride_x, stride_y, addr;
  logic [11:0] count_x, count_y;
  vector_agu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pattern(input int b, input int sx, input int sy, input int nx, input int ny);
    @(negedge clk);
    load = 1; step = 0; base = 11'(b); stride_x = 11'(sx); stride_y = 11'(sy);
    count_x = 12'(nx); count_y = 12'(ny);
    @(negedge clk); load = 0;
    for (int j = 0; j < ny; j++) for (int i = 0; i < nx; i++) begin
      int e;
      e = (b + i*sx + j*sy) & 2047;
      step = 0;
      while ($urandom_range(3) == 0) @(negedge clk);
      checks++;
      if (!valid || addr !== 11'(e) || last !== (i == nx-1 && j == ny-1)) begin
        failures++; $display("FAIL (%0d,%0d) addr %0d exp %0d valid %b last %b", i, j, addr, e, valid, last);
      end
      step = 1;
      @(negedge clk);
    end
    step = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL still valid after the pattern"); end
  endtask

  initial begin
    load = 0; step = 0; base = 0; stride_x = 0; stride_y = 0; count_x = 0; count_y = 0;
    repeat (2) @(negedge clk); rst = 0;
    pattern(0, 1, 0, 20, 1);
    pattern(5, 2, 100, 7, 6);
    pattern(2000, 1, -64, 16, 5);     // rows walk backwards, wrap around
    pattern(3, 0, 512, 1, 4);         // a column
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
