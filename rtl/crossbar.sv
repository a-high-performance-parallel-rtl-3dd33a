// crossbar: the 8 x 8 crossbar between the port controllers and the memory
// controllers, 40 bits wide in each direction (32 data + 8 control).
//
// A port controller asks for a path with req[p] and the number of the
// memory controller it wants in dest[p]; it keeps req high for as long as it
// needs the path and drops it to release it. Each memory-controller column
// has a round-robin arbiter: when the column is free it grants it to the
// next requesting port after the one it last served, and the grant holds
// until that port releases. A port sees grant[p] the cycle after the
// arbitration and may then drive words through. Connected pairs are switched
// combinationally in both directions; an unconnected memory controller sees
// XK_IDLE words and an unconnected port sees an all-zero response.
//
// The document builds the switch from TTL transceivers steered by the port
// and memory controllers; placing the arbiters here, and the round-robin
// policy, are this design's choices.
module crossbar
  import uwgsp4_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] dest   [N],
  output logic [N-1:0]         grant,
  input  xreq_t                p_in   [N],   // from port controllers
  output xrsp_t                p_out  [N],   // to port controllers
  output xreq_t                m_out  [N],   // to memory controllers
  input  xrsp_t                m_in   [N],   // from memory controllers
  output logic [15:0]          conflicts     // cycles a request waited on a busy column
);
  localparam int unsigned LW = $clog2(N);

  logic [N-1:0]  busy;             // column m is connected
  logic [LW-1:0] owner [N];        // port connected to column m
  logic [LW-1:0] last  [N];        // last port granted column m

  // Which requests aim at column m.
  function automatic logic [N-1:0] wants(input int m, input logic [N-1:0] r,
                                         input logic [LW-1:0] d [N]);
    logic [N-1:0] w;
    for (int p = 0; p < N; p++) w[p] = r[p] && (d[p] == LW'(m));
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= '0;
      grant     <= '0;
      conflicts <= '0;
      for (int m = 0; m < N; m++) begin
        owner[m] <= '0;
        last[m]  <= LW'(N - 1);
      end
    end else begin
      for (int m = 0; m < N; m++) begin
        logic [N-1:0] w;
        logic         found;
        w = wants(m, req, dest);
        if (busy[m]) begin
          if (!req[owner[m]]) begin
            busy[m]         <= 1'b0;
            grant[owner[m]] <= 1'b0;
          end
        end else begin
          found = 1'b0;
          for (int k = 1; k <= N; k++) begin
            logic [LW-1:0] p;
            p = LW'((int'(last[m]) + k) % N);
            if (!found && w[p] && !grant[p]) begin
              found    = 1'b1;
              busy[m]  <= 1'b1;
              owner[m] <= p;
              last[m]  <= p;
              grant[p] <= 1'b1;
            end
          end
        end
      end
      // a request that is neither granted nor being granted is waiting
      for (int p = 0; p < N; p++)
        if (req[p] && !grant[p] && busy[dest[p]] && owner[dest[p]] != LW'(p))
          conflicts <= conflicts + 1'b1;
    end
  end

  // switch
  always_comb begin
    for (int m = 0; m < N; m++) begin
      m_out[m] = '0;
      if (busy[m] && grant[owner[m]]) m_out[m] = p_in[owner[m]];
    end
    for (int p = 0; p < N; p++) begin
      p_out[p] = '0;
      if (grant[p] && busy[dest[p]] && owner[dest[p]] == LW'(p)) p_out[p] = m_in[dest[p]];
    end
  end
endmodule
