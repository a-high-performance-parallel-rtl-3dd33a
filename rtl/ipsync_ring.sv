// ipsync_ring: interprocessor synchronization logic, a hardware token ring
// over the vector processing units.
//
// One token circulates; it moves one position per clock while the unit
// holding it does not want it. A unit that needs exclusive use of a shared
// variable raises req[i] and waits for grant[i]; the token stops at it and
// it keeps the grant for as long as req[i] stays high. Dropping req passes
// the token on at the next edge. The document gives the token-ring idea and
// that a unit must hold the token before touching a shared variable; the
// one-hop-per-cycle timing is this design's choice. The ring runs through
// both vector processor boards (units 0-7 on one, 8-15 on the other).
module ipsync_ring #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic [N-1:0] token      // where the token is (one-hot)
);
  always_ff @(posedge clk) begin
    if (rst) begin
      token <= N'(1);
    end else begin
      for (int i = 0; i < N; i++) begin
        int unsigned prev;
        prev = (i == 0) ? N - 1 : i - 1;
        token[i] <= (token[i] && req[i]) || (token[prev] && !req[prev]);
      end
    end
  end

  assign grant = token & req;

  a_one_token: assert property (@(posedge clk) disable iff (rst) $onehot(token));
endmodule
