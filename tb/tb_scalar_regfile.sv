// tb_scalar_regfile: random traffic on the two read and two write ports
// against an array model, including both writes to one register (port 1
// wins) and the reset to zero.
module tb_scalar_regfile;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic [5:0] ra0, ra1, wa0, wa1;
  logic [31:0] rd0, rd1, wd0, wd1;
  logic we0, we1;
  scalar_regfile dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] m [64];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we0 = 0; we1 = 0; ra0 = 0; ra1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0;
    for (int k = 0; k < 64; k++) m[k] = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ra0 = 6'($urandom); ra1 = 6'($urandom);
      #1;
      checks += 2;
      if (rd0 !== m[ra0] || rd1 !== m[ra1]) begin failures++; $display("FAIL read %0d/%0d", ra0, ra1); end
      we0 = $urandom_range(1); we1 = $urandom_range(1);
      wa0 = 6'($urandom); wa1 = (t % 7 == 0) ? wa0 : 6'($urandom);
      wd0 = $urandom; wd1 = $urandom;
      @(posedge clk); #1;
      if (we0) m[wa0] = wd0;
      if (we1) m[wa1] = wd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
