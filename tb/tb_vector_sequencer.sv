// tb_vector_sequencer: runs C = A op B with two FPU models and checks every
// element of C, the alternation between the FPUs, and the cycle count
// (N elements in N + latency + a few cycles).
module tb_vector_sequencer;
  import fp32_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int AW = 11, LAT = 4;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic start; logic [3:0] op;
  logic [AW-1:0] a_base, a_sx, a_sy, b_base, b_sx, b_sy, c_base, c_sx, c_sy;
  logic [11:0] count_x, count_y;
  logic busy, done, a_re, b_re, c_we;
  logic [AW-1:0] a_raddr, b_raddr, c_waddr;
  logic [31:0] a_rdata, b_rdata, c_wdata;
  logic [1:0] fpu_valid, fpu_rvalid;
  logic [3:0] fpu_op;
  logic [31:0] fpu_a, fpu_b, fpu_r [2];

  vector_sequencer dut (.*);
  fpu_model #(.LAT(LAT)) f0 (.clk, .valid(fpu_valid[0]), .op(fpu_op), .a(fpu_a), .b(fpu_b), .rvalid(fpu_rvalid[0]), .r(fpu_r[0]));
  fpu_model #(.LAT(LAT)) f1 (.clk, .valid(fpu_valid[1]), .op(fpu_op), .a(fpu_a), .b(fpu_b), .rvalid(fpu_rvalid[1]), .r(fpu_r[1]));

  logic [31:0] A [2048], B [2048], C [2048];
  always @(posedge clk) begin
    if (a_re) a_rdata <= A[a_raddr];
    if (b_re) b_rdata <= B[b_raddr];
    if (c_we) C[c_waddr] <= c_wdata;
  end

  int checks = 0, failures = 0, n0 = 0, n1 = 0;
  always @(posedge clk) begin
    if (fpu_valid[0]) n0++;
    if (fpu_valid[1]) n1++;
    if (fpu_valid == 2'b11) begin failures++; $display("FAIL both FPUs in one cycle"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [3:0] o, input int nx, input int ny,
                     input int ab, input int asx, input int asy,
                     input int bb, input int bsx, input int bsy,
                     input int cb, input int csx, input int csy);
    int t0, t1;
    for (int k = 0; k < 2048; k++) C[k] = 32'hDEADBEEF;
    n0 = 0; n1 = 0;
    @(negedge clk);
    start = 1; op = o; count_x = 12'(nx); count_y = 12'(ny);
    a_base = AW'(ab); a_sx = AW'(asx); a_sy = AW'(asy);
    b_base = AW'(bb); b_sx = AW'(bsx); b_sy = AW'(bsy);
    c_base = AW'(cb); c_sx = AW'(csx); c_sy = AW'(csy);
    t0 = $time / 25;
    @(negedge clk); start = 0;
    wait (done); t1 = $time / 25;
    @(negedge clk);
    for (int j = 0; j < ny; j++) for (int i = 0; i < nx; i++) begin
      int ia, ib, ic; logic [31:0] e;
      ia = (ab + i*asx + j*asy) & 2047; ib = (bb + i*bsx + j*bsy) & 2047; ic = (cb + i*csx + j*csy) & 2047;
      case (o)
        4'd0: e = r2f(f2r(A[ia]) + f2r(B[ib]));
        4'd1: e = r2f(f2r(A[ia]) * f2r(B[ib]));
        4'd3: e = A[ia] + B[ib];
        default: e = A[ia] * B[ib];
      endcase
      checks++;
      if (C[ic] !== e) begin failures++; if (failures < 8) $display("FAIL elem (%0d,%0d): %h exp %h", i, j, C[ic], e); end
    end
    checks++;
    if (t1 - t0 > nx*ny + LAT + 4) begin failures++; $display("FAIL %0d elements took %0d cycles", nx*ny, t1 - t0); end
    checks++;
    if (n0 + n1 != nx*ny || n0 - n1 > 1 || n1 - n0 > 1) begin failures++; $display("FAIL FPU split %0d/%0d", n0, n1); end
  endtask

  initial begin
    // the helpers themselves, against hand-worked encodings
    checks += 3;
    if (r2f(8.0) !== 32'h41000000 || r2f(-0.75) !== 32'hBF400000 || f2r(32'h40490FDB) < 3.14159 || f2r(32'h40490FDB) > 3.1416)
      begin failures++; $display("FAIL fp32 helpers"); end
    start = 0; op = 0;
    for (int k = 0; k < 2048; k++) begin
      A[k] = r2f(real'(k) * 0.5);
      B[k] = r2f(real'(3 - k) * 0.25);
    end
    repeat (3) @(negedge clk); rst = 0;
    run(0, 100, 1, 0, 1, 0, 200, 1, 0, 1000, 1, 0);          // vector add
    run(1, 8, 8, 0, 1, 64, 500, 2, 3, 1200, 1, 8);            // 2-D multiply, strided
    run(3, 16, 4, 100, 1, 16, 100, 16, 1, 1500, 1, 16);       // transpose-like integer add
    run(4, 2048, 1, 0, 1, 0, 0, 1, 0, 0, 1, 0);               // full-length, in place
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
