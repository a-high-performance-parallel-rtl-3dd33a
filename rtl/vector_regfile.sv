// vector_regfile: one 2048 x 32-bit vector register file. Each vector unit
// has three of them; each has a read port and a separate write port, as in
// the document. The read is synchronous: the word at raddr appears on rdata
// one clock after re. A write lands at the clock edge. Reading and writing
// the same word in one cycle returns the old contents.
module vector_regfile #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end
endmodule
