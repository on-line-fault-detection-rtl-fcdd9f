// cdd_switch: five-port code-disjoint NoC switch with fault location flags.
//
// The switch's data path is made code-disjoint with a single parity bit:
// a correctly encoded flit at an input leaves as a correctly encoded flit at
// an output, and a wrongly encoded one is never passed on.
//
//  * Input check (link error flag). On every input port the parity of the
//    arriving data, P_i(X_i), is compared with the parity bit X_pi received
//    with it. A mismatch raises lef for that port: the error happened on the
//    link that feeds it (or in the previous switch's output driver). The flit
//    is neither stored nor routed; in_ready stays low, which the sender takes
//    as a negative acknowledge and offers the same flit again.
//  * Routing block. Accepted flits wait in a per-input FIFO. A head flit is
//    routed by e-cube (x then y) routing on the destination in its low data
//    bits; a round-robin arbiter per output picks among competing head flits
//    and the output stays reserved for that input until the tail flit has
//    passed (wormhole switching).
//  * Output check (switch error flag). Before a flit leaves, the parity of the
//    outgoing data, P_o(X_o), is computed again and compared with the parity
//    bit that came in with the flit and travelled through the switch
//    unchanged. A mismatch raises sef for that output: the data was corrupted
//    between input and output of this switch. The flit is not sent; since its
//    input FIFO still holds the original, it is routed again next cycle.
//  * The parity bit sent on an output is the incoming parity bit X_pi itself,
//    not a newly computed one, so a corrupted flit cannot acquire a valid
//    code word inside the switch.
//
// Link handshake: a flit moves when valid and ready are both high in a cycle
// (ready is the acknowledge). The flit offered on an output is the head of an
// input FIFO, which is removed only on that acknowledge, so the FIFO head is
// the one-flit retransmission buffer of the outgoing link. The flit crosses
// the switch combinationally from FIFO head to output port; a flit accepted
// at an input can leave one cycle later at the earliest.
//
// err_inject/err_bit flip one data bit at the routing block output of the
// selected ports. They exist to exercise the output check and are tied low in
// normal use; they are this design's own test hook.
//
// Taken from the scheme: input and output parity checks, lef/sef, use of the
// incoming parity bit as output parity, dropping of flits with an input error,
// dimension-order routing. This design's choices: five ports (four
// neighbours and the local core), FIFO depth, wormhole switching with
// head/tail sideband bits, round-robin arbitration, the valid/ready
// acknowledge, retry of a flit whose output check failed.
module cdd_switch
  import cdd_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // input ports
  input  flit_t                     in_flit  [NPORTS],
  input  logic                      in_valid [NPORTS],
  output logic                      in_ready [NPORTS],
  // output ports
  output flit_t                     out_flit  [NPORTS],
  output logic                      out_valid [NPORTS],
  input  logic                      out_ready [NPORTS],
  // fault detection flags, one cycle each time an error is seen
  output logic                      lef [NPORTS],
  output logic                      sef [NPORTS],
  // error injection at the routing block outputs (test hook)
  input  logic                      err_inject [NPORTS],
  input  logic [$clog2(FLIT_W)-1:0] err_bit
);

  localparam int unsigned PIW = $clog2(NPORTS);

  // ---------------------------------------------------------------- inputs
  logic  fifo_full  [NPORTS];
  logic  fifo_empty [NPORTS];
  logic  fifo_pop   [NPORTS];
  logic  in_par     [NPORTS];
  flit_t hol        [NPORTS];      // head-of-line flit of each input FIFO
  port_e hdr_port   [NPORTS];      // route of the head-of-line flit if head
  port_e route_q    [NPORTS];      // route of the message now passing
  port_e cur_port   [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [FLIT_BITS-1:0] rd_bits;

    parity_predict #(.W(FLIT_W)) u_pi (
      .data   (in_flit[i].data),
      .parity (in_par[i])
    );

    // link error flag: received parity differs from predicted parity
    assign lef[i]      = in_valid[i] && (in_par[i] != in_flit[i].par);
    assign in_ready[i] = !fifo_full[i] && !lef[i];

    flit_fifo #(.W(FLIT_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_en   (in_valid[i] && in_ready[i]),
      .wr_data (in_flit[i]),
      .full    (fifo_full[i]),
      .rd_en   (fifo_pop[i]),
      .rd_data (rd_bits),
      .empty   (fifo_empty[i])
    );
    assign hol[i] = flit_t'(rd_bits);

    xy_route #(.X(X), .Y(Y)) u_route (
      .dst_x    (hdr_dst_x(hol[i].data)),
      .dst_y    (hdr_dst_y(hol[i].data)),
      .out_port (hdr_port[i])
    );

    assign cur_port[i] = hol[i].head ? hdr_port[i] : route_q[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                         route_q[i] <= PORT_L;
      else if (fifo_pop[i] && hol[i].head) route_q[i] <= hdr_port[i];
    end
  end

  // --------------------------------------------------------------- outputs
  logic           locked  [NPORTS];   // output reserved by a message
  logic [PIW-1:0] owner   [NPORTS];   // input holding the reservation
  logic           sel_vld [NPORTS];
  logic [PIW-1:0] sel_idx [NPORTS];
  logic           fire    [NPORTS];
  flit_t          xo      [NPORTS];   // flit after the routing block
  logic           out_par [NPORTS];

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [NPORTS-1:0] req, grant;
    logic [PIW-1:0]    grant_idx;

    // Only unreserved outputs take new head flits.
    always_comb begin
      for (int i = 0; i < NPORTS; i++)
        req[i] = !locked[o] && !fifo_empty[i] && hol[i].head &&
                 (hdr_port[i] == port_e'(o));
    end

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (req),
      .advance   (fire[o] && !locked[o]),
      .grant     (grant),
      .grant_idx (grant_idx)
    );

    always_comb begin
      if (locked[o]) begin
        sel_idx[o] = owner[o];
        sel_vld[o] = !fifo_empty[owner[o]] && (cur_port[owner[o]] == port_e'(o));
      end else begin
        sel_idx[o] = grant_idx;
        sel_vld[o] = (grant != '0);
      end
    end

    // Routing block output X_o, with the optional injected error.
    always_comb begin
      xo[o] = hol[sel_idx[o]];
      if (err_inject[o]) xo[o].data[err_bit] = ~xo[o].data[err_bit];
    end

    parity_predict #(.W(FLIT_W)) u_po (
      .data   (xo[o].data),
      .parity (out_par[o])
    );

    // switch error flag: outgoing data does not match the incoming parity
    assign sef[o]       = sel_vld[o] && (out_par[o] != xo[o].par);
    assign out_valid[o] = sel_vld[o] && !sef[o];
    assign out_flit[o]  = xo[o];
    assign fire[o]      = out_valid[o] && out_ready[o];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end else if (fire[o]) begin
        if (xo[o].tail) begin
          locked[o] <= 1'b0;
        end else if (xo[o].head) begin
          locked[o] <= 1'b1;
          owner[o]  <= sel_idx[o];
        end
      end
    end
  end

  // An input FIFO gives up its head flit when the output it is routed to has
  // had it acknowledged by the next hop.
  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      fifo_pop[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (fire[o] && (sel_idx[o] == PIW'(i))) fifo_pop[i] = 1'b1;
    end
  end

  // A flit is never sent with a detected switch error.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_no_send_on_sef: assert property (@(posedge clk) disable iff (!rst_n)
      sef[o] |-> !out_valid[o]);
  end

endmodule
