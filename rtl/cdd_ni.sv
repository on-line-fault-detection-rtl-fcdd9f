// cdd_ni: network interface between an IP core and its switch's local port.
//
// Injection side: the core's flit (head, tail, 64 data bits) gets its parity
// bit here, so that the flit is a code word from the moment it enters the
// network; the valid/ready handshake passes through unchanged, the core
// holding its flit until the switch accepts it.
// Ejection side: the flit coming from the switch's local output is checked
// with a parity prediction block, exactly like a switch input. A mismatch
// raises rx_err (the error is on the ejection link), the flit is refused
// (net_ready low) and the switch offers it again; a correct flit is handed
// to the core without its parity bit.
//
// Both directions are combinational; there is no storage in the interface.
// The scheme places one parity encoder and one parity checker per core; the
// flit-level interface to the core is this design's choice (message
// packetisation is left to the core).
module cdd_ni
  import cdd_pkg::*;
(
  // from the IP core
  input  ip_flit_t ip_tx_flit,
  input  logic     ip_tx_valid,
  output logic     ip_tx_ready,
  // to the switch's local input
  output flit_t    net_tx_flit,
  output logic     net_tx_valid,
  input  logic     net_tx_ready,
  // from the switch's local output
  input  flit_t    net_rx_flit,
  input  logic     net_rx_valid,
  output logic     net_rx_ready,
  // to the IP core
  output ip_flit_t ip_rx_flit,
  output logic     ip_rx_valid,
  input  logic     ip_rx_ready,
  // error on the ejection link
  output logic     rx_err
);

  logic tx_par, rx_par;

  parity_predict #(.W(FLIT_W)) u_enc (
    .data   (ip_tx_flit.data),
    .parity (tx_par)
  );

  assign net_tx_flit  = '{head: ip_tx_flit.head, tail: ip_tx_flit.tail,
                          data: ip_tx_flit.data, par: tx_par};
  assign net_tx_valid = ip_tx_valid;
  assign ip_tx_ready  = net_tx_ready;

  parity_predict #(.W(FLIT_W)) u_chk (
    .data   (net_rx_flit.data),
    .parity (rx_par)
  );

  assign rx_err       = net_rx_valid && (rx_par != net_rx_flit.par);
  assign ip_rx_flit   = '{head: net_rx_flit.head, tail: net_rx_flit.tail,
                          data: net_rx_flit.data};
  assign ip_rx_valid  = net_rx_valid && !rx_err;
  assign net_rx_ready = ip_rx_ready && !rx_err;

endmodule
