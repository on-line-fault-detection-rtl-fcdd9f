// tb_cdd_ni: checks the network interface in both directions.
// Injection: the parity bit added to each flit equals the bit count of the
// data modulo two, head/tail/data pass unchanged, ready passes back.
// Ejection: flits with correct and with corrupted parity are offered; a
// corrupted one must raise rx_err, be withheld from the core and be refused
// towards the switch, a correct one must be passed on.
module tb_cdd_ni;
  import cdd_pkg::*;
  ip_flit_t ip_tx_flit, ip_rx_flit;
  logic     ip_tx_valid, ip_tx_ready, ip_rx_valid, ip_rx_ready;
  flit_t    net_tx_flit, net_rx_flit;
  logic     net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready;
  logic     rx_err;
  int checks = 0, failures = 0, n_err = 0;

  cdd_ni dut (.*);

  function automatic logic count_parity(input logic [63:0] d);
    int ones = 0;
    for (int k = 0; k < 64; k++) ones += int'(d[k]);
    return ones[0];
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      bit bad;
      ip_tx_flit   = '{head: 1'($urandom), tail: 1'($urandom), data: {$urandom, $urandom}};
      ip_tx_valid  = 1'($urandom);
      net_tx_ready = 1'($urandom);
      bad          = ($urandom % 4) == 0;
      net_rx_flit.head = 1'($urandom);
      net_rx_flit.tail = 1'($urandom);
      net_rx_flit.data = {$urandom, $urandom};
      net_rx_flit.par  = count_parity(net_rx_flit.data) ^ bad;
      net_rx_valid = 1'($urandom);
      ip_rx_ready  = 1'($urandom);
      #1;
      chk(net_tx_flit.par == count_parity(ip_tx_flit.data), "encoded parity");
      chk(net_tx_flit.data == ip_tx_flit.data && net_tx_flit.head == ip_tx_flit.head &&
          net_tx_flit.tail == ip_tx_flit.tail, "injected flit");
      chk(net_tx_valid == ip_tx_valid && ip_tx_ready == net_tx_ready, "injection handshake");
      chk(rx_err == (net_rx_valid && bad), "ejection error flag");
      chk(ip_rx_valid == (net_rx_valid && !bad), "ejected valid");
      chk(net_rx_ready == (ip_rx_ready && !(net_rx_valid && bad)), "ejection acknowledge");
      if (net_rx_valid && !bad)
        chk(ip_rx_flit == {net_rx_flit.head, net_rx_flit.tail, net_rx_flit.data}, "ejected flit");
      if (rx_err) n_err++;
    end
    chk(n_err > 0, "ejection errors seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
