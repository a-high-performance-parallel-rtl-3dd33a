// tb_ipsync_ring: checks that exactly one token circulates, that a unit
// gets the grant only while it holds the token, that a grant lasts until the
// request drops, that two units are never granted at once, and that the
// token reaches a requester within N cycles.
module tb_ipsync_ring;
  timeunit 1ns; timeprecision 1ps;
  localparam int N = 16;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;
  logic [N-1:0] req, grant, token;
  ipsync_ring #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int pos = 0;   // reference token position

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the token position
  always @(posedge clk) begin
    if (rst) pos <= 0;
    else if (!req[pos]) pos <= (pos + 1) % N;
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (token !== N'(1) << pos) begin failures++; $display("FAIL token %h expected at %0d", token, pos); end
    checks++;
    if (grant !== (token & req)) begin failures++; $display("FAIL grant"); end
    checks++;
    if (!$onehot0(grant)) begin failures++; $display("FAIL two grants"); end
  end

  initial begin
    int waited;
    req = '0;
    repeat (2) @(negedge clk); rst = 0;
    // several units ask, each holds for a few cycles after being granted
    for (int round = 0; round < 40; round++) begin
      int u; u = $urandom_range(N-1);
      req[u] = 1;
      waited = 0;
      while (!grant[u]) begin @(negedge clk); waited++; end
      checks++;
      if (waited > N) begin failures++; $display("FAIL unit %0d waited %0d", u, waited); end
      // another unit asks meanwhile: it must not be granted
      req[(u + 3) % N] = 1;
      repeat ($urandom_range(4, 1)) @(negedge clk);
      checks++;
      if (grant[(u + 3) % N]) begin failures++; $display("FAIL second grant"); end
      req[u] = 0;
      while (!grant[(u + 3) % N]) @(negedge clk);
      req[(u + 3) % N] = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
