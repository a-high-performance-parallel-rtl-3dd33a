// fpu_model: behavioural stand-in for one floating point processor chip,
// for simulation only (not synthesizable: it computes in double precision `real` and rounds
// to single precision).
// It takes an operation when `valid` is high and returns the result LAT
// cycles later with `rvalid`. Operation codes: 0 float add, 1 float
// multiply, 2 float subtract, 3 integer add, 4 integer multiply.
module fpu_model
  import fp32_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic        clk,
  input  logic        valid,
  input  logic [3:0]  op,
  input  logic [31:0] a, b,
  output logic        rvalid,
  output logic [31:0] r
);
  logic        v_pipe [LAT];
  logic [31:0] r_pipe [LAT];

  function automatic logic [31:0] compute(input logic [3:0] o, input logic [31:0] x, input logic [31:0] y);
    real fx, fy;
    fx = f2r(x);
    fy = f2r(y);
    case (o)
      4'd0: return r2f(fx + fy);
      4'd1: return r2f(fx * fy);
      4'd2: return r2f(fx - fy);
      4'd3: return x + y;
      default: return x * y;
    endcase
  endfunction

  initial for (int k = 0; k < LAT; k++) v_pipe[k] = 1'b0;

  always @(posedge clk) begin
    v_pipe[0] <= valid;
    r_pipe[0] <= compute(op, a, b);
    for (int k = 1; k < LAT; k++) begin
      v_pipe[k] <= v_pipe[k-1];
      r_pipe[k] <= r_pipe[k-1];
    end
  end

  assign rvalid = v_pipe[LAT-1];
  assign r      = r_pipe[LAT-1];
endmodule
