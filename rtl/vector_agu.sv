// vector_agu: vector data addressing hardware. It produces the register-file
// addresses of a vector operand as a two-dimensional strided pattern:
//
//   addr(i, j) = base + i * stride_x + j * stride_y   (mod DEPTH)
//   for j = 0 .. count_y-1, i = 0 .. count_x-1, i fastest
//
// which covers a contiguous vector, a strided vector, a sub-block of an
// image held row by row, a column walk (count_x = 1) and the repeated
// sweeps a convolution or matrix product needs (stride_y may be negative or
// zero, as strides are taken modulo the register file size). The document
// says the control ASIC holds addressing hardware that walks the vector
// register files in different patterns so that FFT, convolution and matrix
// operations need no address arithmetic by the processor; the exact set of
// patterns is not given, and this 2-D form is this design's choice.
//
// Timing: `load` takes the parameters; from the next cycle `addr` is valid
// while `valid` is high and moves on at each clock in which `step` is high.
// `last` flags the final address.
module vector_agu #(
  parameter int unsigned AW = 11,      // log2 of the register file size
  parameter int unsigned CW = 12       // count width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride_x,
  input  logic [AW-1:0] stride_y,
  input  logic [CW-1:0] count_x,
  input  logic [CW-1:0] count_y,
  input  logic          step,
  output logic          valid,
  output logic          last,
  output logic [AW-1:0] addr
);
  logic [AW-1:0] row_addr, sx, sy;
  logic [CW-1:0] i, j, nx, ny;

  assign last = valid && (i == nx - 1'b1) && (j == ny - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      addr <= '0; row_addr <= '0; sx <= '0; sy <= '0;
      i <= '0; j <= '0; nx <= '0; ny <= '0;
    end else if (load) begin
      valid    <= (count_x != 0) && (count_y != 0);
      addr     <= base;
      row_addr <= base;
      sx <= stride_x; sy <= stride_y;
      nx <= count_x;  ny <= count_y;
      i  <= '0;       j  <= '0;
    end else if (valid && step) begin
      if (last) begin
        valid <= 1'b0;
      end else if (i == nx - 1'b1) begin
        i        <= '0;
        j        <= j + 1'b1;
        row_addr <= row_addr + sy;
        addr     <= row_addr + sy;
      end else begin
        i    <= i + 1'b1;
        addr <= addr + sx;
      end
    end
  end
endmodule
