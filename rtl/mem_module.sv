// mem_module: one interleaved memory module of the shared memory (M0..M3 of
// a memory controller). Each controller drives four of these and visits them
// in turn, so each module sees at most one access every fourth cycle of a
// streaming row vector; that is what lets slow DRAM keep up in the original.
//
// Modelled as a synchronous word array: a write lands at the clock edge,
// with one enable per byte (the document's byte masks); a read returns the
// addressed word one cycle after it is requested. The DRAM row/column
// multiplexing and refresh timing are not modelled here; the memory
// controller schedules refresh cycles. The default depth, 2^23 words, gives
// the document's 1 Gbyte over 32 modules.
module mem_module #(
  parameter int unsigned DEPTH_BITS = 23
) (
  input  logic                  clk,
  input  logic                  en,      // access this cycle
  input  logic                  we,      // write (else read)
  input  logic [3:0]            bmask,   // byte enables of a write
  input  logic [DEPTH_BITS-1:0] addr,
  input  logic [31:0]           wdata,
  output logic [31:0]           rdata    // valid the cycle after a read
);
  logic [31:0] mem [2**DEPTH_BITS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int b = 0; b < 4; b++)
          if (bmask[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
