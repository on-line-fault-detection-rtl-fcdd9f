// rr_arbiter: round-robin arbiter for one switch output port.
//
// Grants one of N requesters, searching from the requester after the last one
// served, so that every requester is served within N grants. The grant is
// combinational from req; the priority pointer moves only when the caller
// signals with 'advance' that the granted request was actually served (a
// flit moved), so a stalled grant keeps its place.
//
// Interface: req[N] in, grant[N] one-hot out (all zero when no request),
// grant_idx the index of the granted requester. Reset gives requester 0 the
// highest priority. Round-robin is this design's choice of arbitration.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;   // requester with the highest priority

  always_comb begin
    logic   found;
    int unsigned idx;
    grant     = '0;
    grant_idx = '0;
    found     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr) + k) % N;
      if (!found && req[idx]) begin
        found          = 1'b1;
        grant[idx]     = 1'b1;
        grant_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && (grant != '0)) begin
      ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
    end
  end

endmodule
