// fault_map: fault location register of the mesh.
//
// Turns the per-cycle error flags of the network into a map of the faulty
// resources. Because every switch checks parity both at its inputs and at
// its outputs, each flag points at exactly one resource:
//   lef[n][p]  -> the link entering switch n through port p is faulty,
//   sef[n][p]  -> switch n itself is faulty,
//   rx_err[n]  -> the ejection link from switch n to its core is faulty.
// The marks are sticky until clear is raised. From them the map derives which
// links may still be used: a link is unusable if it was itself marked, or if
// a switch at either of its ends was marked, since a faulty switch takes all
// links attached to it out of service.
//
// Timing: a flag seen in cycle t shows in the outputs from cycle t+1. clear
// has priority over new flags. The link numbering follows the receiving end
// (switch n, input port p); the local input port p = PORT_L is the
// injection link from core n.
module fault_map
  import cdd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic lef    [NODES][NPORTS],
  input  logic sef    [NODES][NPORTS],
  input  logic rx_err [NODES],
  output logic link_faulty   [NODES][NPORTS],
  output logic switch_faulty [NODES],
  output logic eject_faulty  [NODES],
  output logic link_usable   [NODES][NPORTS],
  output logic eject_usable  [NODES]
);

  // Switch at the far end of the link entering (x, y) through port p.
  // Returns the node's own number for the local port and for mesh edges.
  function automatic int unsigned far_end(input int unsigned x,
                                          input int unsigned y,
                                          input int unsigned p);
    case (p)
      int'(PORT_N): return (y + 1 < MESH_Y) ? node_id(x, y + 1) : node_id(x, y);
      int'(PORT_E): return (x + 1 < MESH_X) ? node_id(x + 1, y) : node_id(x, y);
      int'(PORT_S): return (y > 0)          ? node_id(x, y - 1) : node_id(x, y);
      int'(PORT_W): return (x > 0)          ? node_id(x - 1, y) : node_id(x, y);
      default:      return node_id(x, y);
    endcase
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    logic any_sef;

    always_comb begin
      any_sef = 1'b0;
      for (int p = 0; p < NPORTS; p++) any_sef |= sef[n][p];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        switch_faulty[n] <= 1'b0;
        eject_faulty[n]  <= 1'b0;
      end else if (clear) begin
        switch_faulty[n] <= 1'b0;
        eject_faulty[n]  <= 1'b0;
      end else begin
        if (any_sef)   switch_faulty[n] <= 1'b1;
        if (rx_err[n]) eject_faulty[n]  <= 1'b1;
      end
    end

    assign eject_usable[n] = !eject_faulty[n] && !switch_faulty[n];

    for (genvar p = 0; p < NPORTS; p++) begin : g_port
      localparam int unsigned FAR = far_end(n % MESH_X, n / MESH_X, p);

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)       link_faulty[n][p] <= 1'b0;
        else if (clear)   link_faulty[n][p] <= 1'b0;
        else if (lef[n][p]) link_faulty[n][p] <= 1'b1;
      end

      assign link_usable[n][p] = !link_faulty[n][p] && !switch_faulty[n] &&
                                 !switch_faulty[FAR];
    end
  end

endmodule
