// dlt_rr_arb: round-robin arbiter.
//
// Grants one of N requesters (one-hot `grant`, index on `grant_idx`).  The
// search starts just after the requester that last won an accepted grant, so
// every requester that keeps asking is served within N accepted grants.
// `accept` tells the arbiter that the current grant was taken by the
// downstream side; only then does the priority move.  Combinational grant,
// registered priority pointer, active-low synchronous reset.
module dlt_rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           req,
  input  logic                   accept,
  output logic [N-1:0]           grant,
  output logic [$clog2(N)-1:0]   grant_idx,
  output logic                   any
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last_q;

  always_comb begin
    logic [IW-1:0] idx;
    idx       = '0;
    grant     = '0;
    grant_idx = '0;
    any       = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = IW'((int'(last_q) + k) % N);
      if (!any && req[idx]) begin
        any             = 1'b1;
        grant[idx]      = 1'b1;
        grant_idx       = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)             last_q <= IW'(N-1);
    else if (any && accept) last_q <= grant_idx;
  end
endmodule
