// vector_sequencer: the register-to-register vector operation of a vector
// unit, C = A op B element by element.
//
// Three address generators walk vector register files A and B (operands)
// and C (results). Each cycle one element pair is read from A and B and, one
// cycle later, issued to one of the two FPUs: even elements to FPU 0, odd
// elements to FPU 1. Each FPU therefore starts an operation every second
// 40 MHz cycle, the alternating use of two 20 MHz FPUs the document
// describes, and the pair together accepts one element per cycle. Both FPUs
// have the same fixed latency, so results return in element order and are
// written to C at the addresses of the C generator.
//
// The operation code is passed to the FPUs unchanged; what it means is the
// FPU's business. Timing: after `start`, a vector of N elements finishes
// (`done` pulses) after N + FPU latency + 2 cycles; `busy` is high in
// between. The operand patterns come from the caller (see vector_agu).
module vector_sequencer #(
  parameter int unsigned AW = 11,
  parameter int unsigned CW = 12
) (
  input  logic          clk,
  input  logic          rst,
  // command
  input  logic          start,
  input  logic [3:0]    op,
  input  logic [AW-1:0] a_base, a_sx, a_sy,
  input  logic [AW-1:0] b_base, b_sx, b_sy,
  input  logic [AW-1:0] c_base, c_sx, c_sy,
  input  logic [CW-1:0] count_x, count_y,
  output logic          busy,
  output logic          done,
  // vector register files
  output logic          a_re, b_re,
  output logic [AW-1:0] a_raddr, b_raddr,
  input  logic [31:0]   a_rdata, b_rdata,
  output logic          c_we,
  output logic [AW-1:0] c_waddr,
  output logic [31:0]   c_wdata,
  // the two FPUs
  output logic [1:0]    fpu_valid,
  output logic [3:0]    fpu_op,
  output logic [31:0]   fpu_a, fpu_b,
  input  logic [1:0]    fpu_rvalid,
  input  logic [31:0]   fpu_r [2]
);
  logic a_valid, a_last, b_valid, b_last, c_valid, c_last;
  logic rd_step;          // read one element pair this cycle
  logic iss;              // operands on the register file outputs
  logic sel;              // FPU for the element being issued
  logic [3:0] op_q;
  logic res_valid;
  logic [31:0] res;

  assign rd_step = busy && a_valid && b_valid;

  vector_agu #(.AW(AW), .CW(CW)) u_agu_a (
    .clk, .rst, .load(start), .base(a_base), .stride_x(a_sx), .stride_y(a_sy),
    .count_x, .count_y, .step(rd_step), .valid(a_valid), .last(a_last), .addr(a_raddr));
  vector_agu #(.AW(AW), .CW(CW)) u_agu_b (
    .clk, .rst, .load(start), .base(b_base), .stride_x(b_sx), .stride_y(b_sy),
    .count_x, .count_y, .step(rd_step), .valid(b_valid), .last(b_last), .addr(b_raddr));
  vector_agu #(.AW(AW), .CW(CW)) u_agu_c (
    .clk, .rst, .load(start), .base(c_base), .stride_x(c_sx), .stride_y(c_sy),
    .count_x, .count_y, .step(res_valid), .valid(c_valid), .last(c_last), .addr(c_waddr));

  assign a_re = rd_step;
  assign b_re = rd_step;

  always_comb begin
    fpu_valid      = '0;
    fpu_valid[sel] = iss;
    fpu_op         = op_q;
    fpu_a          = a_rdata;
    fpu_b          = b_rdata;
  end

  assign res_valid = |fpu_rvalid;
  assign res       = fpu_rvalid[1] ? fpu_r[1] : fpu_r[0];
  assign c_we      = res_valid && c_valid;
  assign c_wdata   = res;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      iss      <= 1'b0;
      sel      <= 1'b0;
      op_q     <= '0;
    end else begin
      done     <= 1'b0;
      iss      <= rd_step;
      if (iss) sel <= ~sel;
      if (start) begin
        busy <= (count_x != 0) && (count_y != 0);
        op_q <= op;
        sel  <= 1'b0;
      end else if (busy && c_we && c_last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  a_in_order: assert property (@(posedge clk) disable iff (rst) !(fpu_rvalid == 2'b11));
  a_pattern_match: assert property (@(posedge clk) disable iff (rst) a_valid == b_valid && a_last == b_last);
endmodule
