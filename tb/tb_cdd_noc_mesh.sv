// tb_cdd_noc_mesh: end-to-end test of the 4x4 code-disjoint mesh at its
// default parameters.
//
// Phase 1 replays the two-fault example of the scheme: a message from the
// switch at (0,2) to (2,3) crosses a faulty switch at (1,2), and a message
// from (0,0) to (3,3) crosses a faulty link from (1,0) to (2,0). With the
// faults active for some cycles, the fault map must mark exactly that switch,
// and then exactly that link, and both messages must still arrive intact
// once the fault has gone. While a fault lasts, the held flit must be caught
// again at every retry.
//
// Phase 2 runs uniform random traffic (every core may start a 4-flit message
// to a random other core each cycle, 0.25 flits/cycle/core on average) with
// random transient errors on the mesh links, the injection and ejection
// links and at switch outputs, and random back-pressure from the receiving
// cores. Every cycle each raised flag must coincide with an error injected at
// that very place (precise location), and every message must arrive once,
// in order per source, unmixed with others and with its payload intact.
// The test counts link errors, switch errors, ejection errors, injection
// stalls, ejection back-pressure, fault-map marks and links put out of use by
// a faulty switch, and fails if any of them never happened.
module tb_cdd_noc_mesh;
  import cdd_pkg::*;

  logic clk = 0, rst_n = 0;
  ip_flit_t ip_tx_flit  [NODES];
  logic     ip_tx_valid [NODES];
  logic     ip_tx_ready [NODES];
  ip_flit_t ip_rx_flit  [NODES];
  logic     ip_rx_valid [NODES];
  logic     ip_rx_ready [NODES];
  logic     link_inject [NODES][NPORTS];
  logic     sw_inject   [NODES][NPORTS];
  logic     eject_inject [NODES];
  logic [5:0] err_bit;
  logic     lef [NODES][NPORTS];
  logic     sef [NODES][NPORTS];
  logic     rx_err [NODES];
  logic     fault_clear;
  logic     link_faulty [NODES][NPORTS];
  logic     switch_faulty [NODES];
  logic     eject_faulty [NODES];
  logic     link_usable [NODES][NPORTS];
  logic     eject_usable [NODES];

  cdd_noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_lef = 0, n_sef = 0, n_rx_err = 0, n_inj_stall = 0, n_ej_bp = 0;
  int n_link_marked = 0, n_sw_marked = 0, n_ej_marked = 0, n_unusable = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] payload(int src, int seq, int idx, int dst);
    logic [31:0] h;
    h = 32'(src * 32'h9E3779B1 + seq * 32'h85EBCA77 + idx * 32'hC2B2AE3D + dst);
    return {h, 16'(seq), 6'd0, 2'(idx), 4'(src), 4'(dst)};
  endfunction

  // ------------------------------------------------------------- traffic
  ip_flit_t tx_q [NODES][$];
  int       tx_start [NODES][$];     // creation cycle of each queued message
  int       seqs [NODES];
  int       sent_msgs = 0, rcvd_msgs = 0;
  longint   lat_sum = 0;
  int       created_at [NODES][int]; // [src][seq] -> creation cycle

  task automatic queue_msg(int src, int dst);
    for (int k = 0; k < MSG_FLITS; k++) begin
      ip_flit_t f;
      f.head = (k == 0);
      f.tail = (k == MSG_FLITS - 1);
      f.data = payload(src, seqs[src], k, dst);
      tx_q[src].push_back(f);
    end
    created_at[src][seqs[src]] = cyc;
    seqs[src]++;
    sent_msgs++;
  endtask

  bit in_msg [NODES];
  int cur_src [NODES], cur_seq [NODES], next_idx [NODES];
  int last_seq [NODES][NODES];

  task automatic receive(int d, ip_flit_t f);
    int src, idx, seq, dst;
    src = int'(f.data[7:4]);
    idx = int'(f.data[9:8]);
    seq = int'(f.data[31:16]);
    dst = int'(f.data[3:0]);
    chk(f.data == payload(src, seq, idx, dst), "payload");
    chk(dst == d, "delivered to the wrong core");
    chk(f.head == (idx == 0) && f.tail == (idx == MSG_FLITS - 1), "head/tail");
    if (f.head) begin
      chk(!in_msg[d], "messages interleaved");
      chk(seq > last_seq[src][d], "message order");
      last_seq[src][d] = seq;
      in_msg[d] = 1; cur_src[d] = src; cur_seq[d] = seq; next_idx[d] = 1;
    end else begin
      chk(in_msg[d] && src == cur_src[d] && seq == cur_seq[d] && idx == next_idx[d],
          "flit sequence");
      next_idx[d]++;
      if (f.tail) begin
        in_msg[d] = 0;
        rcvd_msgs++;
        lat_sum += longint'(cyc - created_at[src][seq]);
      end
    end
  endtask

  // ------------------------------------------------------------- one cycle
  int  p_link = 0, p_sw = 0, p_ej = 0;   // error probabilities, per mille
  int  p_bp = 0;                         // receive back-pressure, percent
  bit  force_sw [NODES][NPORTS];
  bit  force_link [NODES][NPORTS];
  bit  seen_lef [NODES][NPORTS];
  bit  seen_sef [NODES];
  bit  seen_rx [NODES];

  task automatic step();
    bit tx_fire [NODES];
    bit rx_fire [NODES];
    ip_flit_t got [NODES];
    @(negedge clk);
    err_bit = 6'($urandom);
    for (int n = 0; n < NODES; n++) begin
      ip_tx_valid[n]  = tx_q[n].size() > 0;
      ip_tx_flit[n]   = tx_q[n].size() > 0 ? tx_q[n][0] : '0;
      ip_rx_ready[n]  = ($urandom % 100) >= p_bp;
      eject_inject[n] = ($urandom % 1000) < p_ej;
      for (int p = 0; p < NPORTS; p++) begin
        link_inject[n][p] = force_link[n][p] || ($urandom % 1000) < p_link;
        sw_inject[n][p]   = force_sw[n][p]   || ($urandom % 1000) < p_sw;
      end
    end
    #1;
    for (int n = 0; n < NODES; n++) begin
      for (int p = 0; p < NPORTS; p++) begin
        if (lef[n][p]) begin
          n_lef++;
          seen_lef[n][p] = 1;
          chk(link_inject[n][p], "lef raised where no link error was injected");
        end
        if (sef[n][p]) begin
          n_sef++;
          seen_sef[n] = 1;
          chk(sw_inject[n][p], "sef raised where no switch error was injected");
        end
        if (!link_usable[n][p] && !link_faulty[n][p]) n_unusable++;
      end
      if (rx_err[n]) begin
        n_rx_err++;
        seen_rx[n] = 1;
        chk(eject_inject[n], "rx_err raised where no ejection error was injected");
      end
      if (ip_tx_valid[n] && !ip_tx_ready[n]) n_inj_stall++;
      if (ip_rx_valid[n] && !ip_rx_ready[n]) n_ej_bp++;
      tx_fire[n] = ip_tx_valid[n] && ip_tx_ready[n];
      rx_fire[n] = ip_rx_valid[n] && ip_rx_ready[n];
      got[n]     = ip_rx_flit[n];
    end
    @(posedge clk);
    for (int n = 0; n < NODES; n++) begin
      if (tx_fire[n]) void'(tx_q[n].pop_front());
      if (rx_fire[n]) receive(n, got[n]);
    end
    cyc++;
  endtask

  task automatic drain(int max_cycles);
    for (int c = 0; c < max_cycles && rcvd_msgs != sent_msgs; c++) step();
  endtask

  // Compare the fault map with the flags the testbench saw.
  task automatic check_map(string what);
    for (int n = 0; n < NODES; n++) begin
      chk(switch_faulty[n] == seen_sef[n], {what, ": switch mark"});
      chk(eject_faulty[n] == seen_rx[n], {what, ": ejection link mark"});
      for (int p = 0; p < NPORTS; p++)
        chk(link_faulty[n][p] == seen_lef[n][p], {what, ": link mark"});
    end
  endtask

  task automatic count_marks();
    for (int n = 0; n < NODES; n++) begin
      if (switch_faulty[n]) n_sw_marked++;
      if (eject_faulty[n]) n_ej_marked++;
      for (int p = 0; p < NPORTS; p++) if (link_faulty[n][p]) n_link_marked++;
    end
  endtask

  task automatic clear_map();
    @(negedge clk);
    fault_clear = 1;
    @(posedge clk);
    #1 fault_clear = 0;
    foreach (seen_sef[n]) begin
      seen_sef[n] = 0; seen_rx[n] = 0;
      for (int p = 0; p < NPORTS; p++) seen_lef[n][p] = 0;
    end
  endtask

  localparam int S1 = 2 * MESH_X + 0, S3 = 2 * MESH_X + 1, D1 = 3 * MESH_X + 2;
  localparam int S2 = 0, S6 = 2, D2 = 3 * MESH_X + 3;

  initial begin
    fault_clear = 0;
    err_bit = 0;
    for (int n = 0; n < NODES; n++) begin
      ip_tx_valid[n] = 0; ip_tx_flit[n] = '0; ip_rx_ready[n] = 1; eject_inject[n] = 0;
      in_msg[n] = 0; seqs[n] = 0; seen_sef[n] = 0; seen_rx[n] = 0;
      for (int p = 0; p < NPORTS; p++) begin
        link_inject[n][p] = 0; sw_inject[n][p] = 0;
        force_sw[n][p] = 0; force_link[n][p] = 0; seen_lef[n][p] = 0;
      end
      for (int d = 0; d < NODES; d++) last_seq[n][d] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- Phase 1a: faulty switch on the path (0,2) -> (2,3).
    force_sw[S3][PORT_E] = 1;
    queue_msg(S1, D1);
    repeat (12) step();
    force_sw[S3][PORT_E] = 0;
    // The held flit is retried and caught again every cycle the fault lasts.
    chk(n_sef >= 8, "persistent switch fault detected on every retry");
    chk(rcvd_msgs == 0, "nothing delivered through a faulty switch");
    drain(200);
    chk(rcvd_msgs == 1, "message through the faulty switch delivered");
    check_map("switch fault");
    for (int n = 0; n < NODES; n++) begin
      chk(switch_faulty[n] == (n == S3), "only the faulty switch is marked");
      for (int p = 0; p < NPORTS; p++) chk(!link_faulty[n][p], "no link marked for a switch fault");
    end
    chk(!link_usable[S3 + 1][PORT_W] && !link_usable[S1][PORT_E],
        "links attached to the faulty switch are out of use");
    count_marks();
    repeat (2) step();    // let the usable-link count see the switch mark
    clear_map();

    // ---- Phase 1b: faulty link from (1,0) to (2,0) on the path (0,0) -> (3,3).
    force_link[S6][PORT_W] = 1;
    queue_msg(S2, D2);
    repeat (12) step();
    force_link[S6][PORT_W] = 0;
    chk(n_lef >= 8, "persistent link fault detected on every retransmission");
    chk(rcvd_msgs == 1, "nothing delivered over a faulty link");
    drain(200);
    chk(rcvd_msgs == 2, "message over the faulty link delivered");
    check_map("link fault");
    for (int n = 0; n < NODES; n++) begin
      chk(!switch_faulty[n], "no switch marked for a link fault");
      for (int p = 0; p < NPORTS; p++)
        chk(link_faulty[n][p] == (n == S6 && p == PORT_W), "only the faulty link is marked");
    end
    count_marks();
    clear_map();

    // ---- Phase 2: uniform traffic, random transient errors, back-pressure.
    p_link = 3; p_sw = 3; p_ej = 10; p_bp = 30;
    for (int c = 0; c < 3000; c++) begin
      for (int n = 0; n < NODES; n++)
        if (($urandom % 16) == 0) begin
          int d;
          d = $urandom % (NODES - 1);
          if (d >= n) d++;
          queue_msg(n, d);
        end
      step();
    end
    p_link = 0; p_sw = 0; p_ej = 0; p_bp = 0;
    drain(20000);
    step();
    check_map("random errors");
    count_marks();

    chk(rcvd_msgs == sent_msgs, "all messages delivered");
    chk(n_lef > 0,         "link errors located");
    chk(n_sef > 0,         "switch errors located");
    chk(n_rx_err > 0,      "ejection link errors located");
    chk(n_inj_stall > 0,   "injection stalls");
    chk(n_ej_bp > 0,       "ejection back-pressure");
    chk(n_link_marked > 0, "links marked faulty");
    chk(n_sw_marked > 0,   "switches marked faulty");
    chk(n_ej_marked > 0,   "ejection links marked faulty");
    chk(n_unusable > 0,    "links put out of use by a faulty switch");
    $display("messages sent %0d received %0d in %0d cycles, mean latency %0d cycles",
             sent_msgs, rcvd_msgs, cyc, rcvd_msgs ? lat_sum / rcvd_msgs : 0);
    $display("lef %0d sef %0d rx_err %0d inj-stall %0d ej-backpressure %0d",
             n_lef, n_sef, n_rx_err, n_inj_stall, n_ej_bp);
    $display("marks: links %0d switches %0d ejection links %0d; unusable-by-switch %0d",
             n_link_marked, n_sw_marked, n_ej_marked, n_unusable);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
