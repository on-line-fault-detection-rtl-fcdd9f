// tb_noc_workload: uniform-traffic sweep of the 4x4 mesh at default
// parameters, at the two injection rates the scheme was evaluated with
// (0.1 and 0.25 flits/cycle/core, 4-flit messages, random uniform
// destinations) and at flit error rates from 0.001 % to 4 %.
//
// A flit error is modelled as a flipped data bit on a link: every link of the
// mesh, including the injection and ejection links, independently corrupts
// the flit it carries in a cycle with the given probability. Each error is
// caught by the parity check at the receiving end and the flit is sent again
// from the sender's buffer.
//
// A third sweep keeps every core's queue non-empty (saturation) and reports
// the effective throughput: the flits delivered per cycle and core while
// errors force retransmissions, relative to the lowest error rate.
//
// For each point the testbench reports the mean message latency (from the
// cycle a message is created at its source until its tail flit reaches the
// destination core) and the accepted throughput, and checks that every
// message arrives intact, that no error escapes detection (each point ends
// with every payload verified) and that errors were actually injected and
// located at the higher rates.
module tb_noc_workload;
  import cdd_pkg::*;

  localparam int CYCLES = 2000;

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

  ip_flit_t tx_q [NODES][$];
  int       seqs [NODES];
  int       created_at [NODES][int];
  int       sent_msgs, rcvd_msgs, n_err;
  longint   lat_sum;
  bit       in_msg [NODES];
  int       cur_src [NODES], cur_seq [NODES], next_idx [NODES];

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

  task automatic receive(int d, ip_flit_t f);
    int src, idx, seq, dst;
    src = int'(f.data[7:4]);
    idx = int'(f.data[9:8]);
    seq = int'(f.data[31:16]);
    dst = int'(f.data[3:0]);
    chk(f.data == payload(src, seq, idx, dst) && dst == d, "payload");
    if (f.head) begin
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

  // Error probability in units of 1e-5 (0.001 % = 1).
  int p_err = 0;

  task automatic step();
    bit tx_fire [NODES];
    bit rx_fire [NODES];
    ip_flit_t got [NODES];
    @(negedge clk);
    err_bit = 6'($urandom);
    for (int n = 0; n < NODES; n++) begin
      ip_tx_valid[n]  = tx_q[n].size() > 0;
      ip_tx_flit[n]   = tx_q[n].size() > 0 ? tx_q[n][0] : '0;
      ip_rx_ready[n]  = 1;
      eject_inject[n] = ($urandom % 100000) < p_err;
      for (int p = 0; p < NPORTS; p++) begin
        link_inject[n][p] = ($urandom % 100000) < p_err;
        sw_inject[n][p]   = 0;
      end
    end
    #1;
    for (int n = 0; n < NODES; n++) begin
      for (int p = 0; p < NPORTS; p++) if (lef[n][p]) n_err++;
      if (rx_err[n]) n_err++;
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

  // One measurement point; ir_milli is the injection rate in
  // 1/1000 flits/cycle/core.
  // ir_milli = 0 means saturation: every core always has a message waiting.
  real sat_thr0;

  task automatic run_point(int ir_milli, int err);
    int start, rcvd_in_window;
    real thr, lat;
    sent_msgs = 0; rcvd_msgs = 0; lat_sum = 0; n_err = 0;
    p_err = err;
    start = cyc;
    for (int c = 0; c < CYCLES; c++) begin
      for (int n = 0; n < NODES; n++)
        if (ir_milli == 0 ? tx_q[n].size() < MSG_FLITS
                          : ($urandom % (1000 * MSG_FLITS)) < ir_milli) begin
          int d;
          d = $urandom % (NODES - 1);
          if (d >= n) d++;
          queue_msg(n, d);
        end
      step();
    end
    rcvd_in_window = rcvd_msgs;
    p_err = 0;
    for (int c = 0; c < 50000 && rcvd_msgs != sent_msgs; c++) step();
    chk(rcvd_msgs == sent_msgs, "all messages delivered");
    if (err >= 500) chk(n_err > 0, "errors detected");
    thr = real'(rcvd_in_window * MSG_FLITS) / real'(CYCLES * NODES);
    lat = rcvd_msgs ? real'(lat_sum) / real'(rcvd_msgs) : 0.0;
    if (ir_milli == 0) begin
      if (err == rates[0]) sat_thr0 = thr;
      $display("saturation  flit error rate %7.3f %%  messages %5d  errors located %5d  effective throughput %0.3f flits/cycle/core (%0.1f %% of the lowest error rate)",
               real'(err) / 1000.0, sent_msgs, n_err, thr, 100.0 * thr / sat_thr0);
      chk(thr > 0.25, "saturation throughput above the evaluated injection rate");
    end else begin
      $display("IR %0.3f  flit error rate %7.3f %%  messages %5d  errors located %5d  mean latency %6.2f cycles  accepted %0.3f flits/cycle/core",
               real'(ir_milli) / 1000.0, real'(err) / 1000.0, sent_msgs, n_err, lat, thr);
      if (ir_milli == 100) chk(thr > 0.08, "accepted throughput at low load");
    end
  endtask

  int rates [8] = '{1, 10, 100, 500, 1000, 2000, 3000, 4000};

  initial begin
    fault_clear = 0;
    err_bit = 0;
    for (int n = 0; n < NODES; n++) begin
      ip_tx_valid[n] = 0; ip_tx_flit[n] = '0; ip_rx_ready[n] = 1; eject_inject[n] = 0;
      seqs[n] = 0; in_msg[n] = 0;
      for (int p = 0; p < NPORTS; p++) begin link_inject[n][p] = 0; sw_inject[n][p] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (rates[k]) run_point(100, rates[k]);
    foreach (rates[k]) run_point(250, rates[k]);
    foreach (rates[k]) run_point(0, rates[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
