// fp32_pkg: IEEE-754 single-precision helpers for the testbenches, built on
// the simulator's double-precision `real` (conversion of finite, normal
// values; zero maps to zero; rounding to nearest, ties to even).
package fp32_pkg;
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:0] == 0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    int e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:29]};
    if (d[28] && (d[27:0] != 0 || d[29])) m = m + 1'b1;
    if (m[23]) begin e = e + 1; m = 24'h0; end
    return {d[63], 8'(e), m[22:0]};
  endfunction
endpackage
