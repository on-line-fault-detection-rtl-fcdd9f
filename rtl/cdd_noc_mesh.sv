// cdd_noc_mesh: 4x4 mesh network-on-chip with on-line fault detection and
// location.
//
// Sixteen code-disjoint switches (cdd_switch) are connected as a mesh; switch
// n = y*4 + x sits at column x, row y and serves IP core n through a network
// interface (cdd_ni). Every flit carries one parity bit from the core that
// sends it to the core that receives it. Each switch checks that parity at
// each input (link error flag, lef) and again at each output against the
// parity bit that came in with the flit (switch error flag, sef), so an
// error is pinned either to one link or to one switch. A fault_map collects
// the flags into sticky marks of faulty links and switches and the links that
// remain usable.
//
// Flow control is valid/ready on every link; a flit rejected for a parity
// error is offered again by the sender in the next cycle (flit-level
// retransmission between neighbours), a flit failing the output check of a
// switch is routed again from the switch's input buffer. Routing is
// dimension-order (x first), switching is wormhole.
//
// Ports: per core a flit interface in each direction, the raw flags, the
// fault map, and two error-injection inputs used to exercise the scheme
// (link_inject flips data bit err_bit on the link entering switch n through
// port p, the local port being the injection link; sw_inject flips that bit
// at output p of switch n's routing block, eject_inject flips it on the
// ejection link from switch n to its core). Tie them low in normal use.
//
// Mesh size, flit width and message length are those the scheme was evaluated
// with; edge ports of the mesh are left unconnected (never valid, never
// ready), which dimension-order routing never needs.
module cdd_noc_mesh
  import cdd_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // IP core flit interfaces
  input  ip_flit_t                  ip_tx_flit  [NODES],
  input  logic                      ip_tx_valid [NODES],
  output logic                      ip_tx_ready [NODES],
  output ip_flit_t                  ip_rx_flit  [NODES],
  output logic                      ip_rx_valid [NODES],
  input  logic                      ip_rx_ready [NODES],
  // error injection
  input  logic                      link_inject [NODES][NPORTS],
  input  logic                      sw_inject   [NODES][NPORTS],
  input  logic                      eject_inject [NODES],
  input  logic [$clog2(FLIT_W)-1:0] err_bit,
  // detection flags
  output logic                      lef    [NODES][NPORTS],
  output logic                      sef    [NODES][NPORTS],
  output logic                      rx_err [NODES],
  // fault location
  input  logic                      fault_clear,
  output logic                      link_faulty   [NODES][NPORTS],
  output logic                      switch_faulty [NODES],
  output logic                      eject_faulty  [NODES],
  output logic                      link_usable   [NODES][NPORTS],
  output logic                      eject_usable  [NODES]
);

  // What each switch drives and receives, indexed [node][port].
  flit_t sw_in_flit   [NODES][NPORTS];
  logic  sw_in_valid  [NODES][NPORTS];
  logic  sw_in_ready  [NODES][NPORTS];
  flit_t sw_out_flit  [NODES][NPORTS];
  logic  sw_out_valid [NODES][NPORTS];
  logic  sw_out_ready [NODES][NPORTS];
  flit_t link_flit    [NODES][NPORTS];   // link into (node, port), before injection

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      cdd_switch #(.X(x), .Y(y), .FIFO_DEPTH(FIFO_DEPTH)) u_sw (
        .clk        (clk),
        .rst_n      (rst_n),
        .in_flit    (sw_in_flit[N]),
        .in_valid   (sw_in_valid[N]),
        .in_ready   (sw_in_ready[N]),
        .out_flit   (sw_out_flit[N]),
        .out_valid  (sw_out_valid[N]),
        .out_ready  (sw_out_ready[N]),
        .lef        (lef[N]),
        .sef        (sef[N]),
        .err_inject (sw_inject[N]),
        .err_bit    (err_bit)
      );

      flit_t eject_flit;

      // Error injection on the ejection link.
      always_comb begin
        eject_flit = sw_out_flit[N][PORT_L];
        if (eject_inject[N])
          eject_flit.data[err_bit] = ~sw_out_flit[N][PORT_L].data[err_bit];
      end

      cdd_ni u_ni (
        .ip_tx_flit   (ip_tx_flit[N]),
        .ip_tx_valid  (ip_tx_valid[N]),
        .ip_tx_ready  (ip_tx_ready[N]),
        .net_tx_flit  (link_flit[N][PORT_L]),
        .net_tx_valid (sw_in_valid[N][PORT_L]),
        .net_tx_ready (sw_in_ready[N][PORT_L]),
        .net_rx_flit  (eject_flit),
        .net_rx_valid (sw_out_valid[N][PORT_L]),
        .net_rx_ready (sw_out_ready[N][PORT_L]),
        .ip_rx_flit   (ip_rx_flit[N]),
        .ip_rx_valid  (ip_rx_valid[N]),
        .ip_rx_ready  (ip_rx_ready[N]),
        .rx_err       (rx_err[N])
      );

      // North: to/from (x, y+1), whose south port faces us.
      if (y + 1 < MESH_Y) begin : g_n
        localparam int unsigned M = (y + 1) * MESH_X + x;
        assign link_flit[N][PORT_N]    = sw_out_flit[M][PORT_S];
        assign sw_in_valid[N][PORT_N]  = sw_out_valid[M][PORT_S];
        assign sw_out_ready[M][PORT_S] = sw_in_ready[N][PORT_N];
      end else begin : g_n_edge
        assign link_flit[N][PORT_N]    = '0;
        assign sw_in_valid[N][PORT_N]  = 1'b0;
        assign sw_out_ready[N][PORT_N] = 1'b0;
      end

      // East: to/from (x+1, y), whose west port faces us.
      if (x + 1 < MESH_X) begin : g_e
        localparam int unsigned M = y * MESH_X + x + 1;
        assign link_flit[N][PORT_E]    = sw_out_flit[M][PORT_W];
        assign sw_in_valid[N][PORT_E]  = sw_out_valid[M][PORT_W];
        assign sw_out_ready[M][PORT_W] = sw_in_ready[N][PORT_E];
      end else begin : g_e_edge
        assign link_flit[N][PORT_E]    = '0;
        assign sw_in_valid[N][PORT_E]  = 1'b0;
        assign sw_out_ready[N][PORT_E] = 1'b0;
      end

      // South: to/from (x, y-1), whose north port faces us.
      if (y > 0) begin : g_s
        localparam int unsigned M = (y - 1) * MESH_X + x;
        assign link_flit[N][PORT_S]    = sw_out_flit[M][PORT_N];
        assign sw_in_valid[N][PORT_S]  = sw_out_valid[M][PORT_N];
        assign sw_out_ready[M][PORT_N] = sw_in_ready[N][PORT_S];
      end else begin : g_s_edge
        assign link_flit[N][PORT_S]    = '0;
        assign sw_in_valid[N][PORT_S]  = 1'b0;
        assign sw_out_ready[N][PORT_S] = 1'b0;
      end

      // West: to/from (x-1, y), whose east port faces us.
      if (x > 0) begin : g_w
        localparam int unsigned M = y * MESH_X + x - 1;
        assign link_flit[N][PORT_W]    = sw_out_flit[M][PORT_E];
        assign sw_in_valid[N][PORT_W]  = sw_out_valid[M][PORT_E];
        assign sw_out_ready[M][PORT_E] = sw_in_ready[N][PORT_W];
      end else begin : g_w_edge
        assign link_flit[N][PORT_W]    = '0;
        assign sw_in_valid[N][PORT_W]  = 1'b0;
        assign sw_out_ready[N][PORT_W] = 1'b0;
      end

      // Error injection on the links entering this switch.
      for (genvar p = 0; p < NPORTS; p++) begin : g_inj
        always_comb begin
          sw_in_flit[N][p] = link_flit[N][p];
          if (link_inject[N][p])
            sw_in_flit[N][p].data[err_bit] = ~link_flit[N][p].data[err_bit];
        end
      end
    end
  end

  fault_map u_map (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (fault_clear),
    .lef           (lef),
    .sef           (sef),
    .rx_err        (rx_err),
    .link_faulty   (link_faulty),
    .switch_faulty (switch_faulty),
    .eject_faulty  (eject_faulty),
    .link_usable   (link_usable),
    .eject_usable  (eject_usable)
  );

endmodule
