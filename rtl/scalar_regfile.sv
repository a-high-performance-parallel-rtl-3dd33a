// scalar_regfile: the 64 x 32-bit scalar register file of a vector unit.
//
// The document gives 64 four-ported 32-bit registers, used during scalar
// execution to move data between the two FPUs and the data cache. This
// design splits the four ports into two read ports (combinational read) and
// two write ports (written at the clock edge); if both write ports address
// the same register in one cycle, port 1 wins. A read in the same cycle as a
// write to that register returns the old value. All registers reset to 0.
module scalar_regfile #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(DEPTH)-1:0] ra0, ra1,
  output logic [WIDTH-1:0]         rd0, rd1,
  input  logic                     we0, we1,
  input  logic [$clog2(DEPTH)-1:0] wa0, wa1,
  input  logic [WIDTH-1:0]         wd0, wd1
);
  logic [WIDTH-1:0] regs [DEPTH];

  assign rd0 = regs[ra0];
  assign rd1 = regs[ra1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else begin
      if (we0 && !(we1 && wa1 == wa0)) regs[wa0] <= wd0;
      if (we1) regs[wa1] <= wd1;
    end
  end
endmodule
