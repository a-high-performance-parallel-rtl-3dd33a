// tb_vector_regfile: writes and reads a 2048-word register file at random,
// in the same cycle too, and checks the one-cycle read latency and the
// read-old-value rule against a model.
module tb_vector_regfile;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0;
  always #12.5 clk = ~clk;
  logic re, we;
  logic [10:0] raddr, waddr;
  logic [31:0] rdata, wdata;
  vector_regfile dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] m [2048];
  logic [31:0] exp_q;
  logic        chk_q = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    // fill
    for (int k = 0; k < 2048; k++) begin
      @(negedge clk); we = 1; waddr = 11'(k); wdata = $urandom; m[k] = wdata;
    end
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (chk_q) begin
        checks++;
        if (rdata !== exp_q) begin failures++; $display("FAIL rdata %h exp %h", rdata, exp_q); end
      end
      re = $urandom_range(1); raddr = 11'($urandom);
      we = $urandom_range(1); waddr = (t % 5 == 0) ? raddr : 11'($urandom); wdata = $urandom;
      exp_q = m[raddr]; chk_q = re;
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
