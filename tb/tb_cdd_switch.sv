// tb_cdd_switch: drives the switch at mesh position (1,1) with 4-flit
// messages on all five inputs towards random destinations, with random
// back-pressure on the outputs, random parity errors on the input links and
// random errors injected at the routing block outputs.
//
// Checked independently of the switch:
//  - lef is raised exactly when a valid input flit has wrong parity, and such
//    a flit is never accepted (the driver then offers the clean flit again);
//  - sef is raised only where an error was injected, and no flit leaves an
//    output in a cycle with an injected error;
//  - every message leaves on the dimension-order output for its destination,
//    its four flits in order and not interleaved with another message, with
//    the payload it was sent with and the parity bit it entered with;
//  - every message sent is received exactly once;
//  - on an idle switch a head flit accepted in cycle t leaves in cycle t+1
//    and a message streams at one flit per cycle.
module tb_cdd_switch;
  import cdd_pkg::*;

  localparam int SX = 1, SY = 1;
  localparam int MSGS_PER_INPUT = 60;

  logic  clk = 0, rst_n = 0;
  flit_t in_flit   [NPORTS];
  logic  in_valid  [NPORTS];
  logic  in_ready  [NPORTS];
  flit_t out_flit  [NPORTS];
  logic  out_valid [NPORTS];
  logic  out_ready [NPORTS];
  logic  lef [NPORTS];
  logic  sef [NPORTS];
  logic  err_inject [NPORTS];
  logic [5:0] err_bit;

  cdd_switch #(.X(SX), .Y(SY), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lef = 0, n_sef = 0, n_full_stall = 0, n_retry = 0;
  int cyc = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Payload of flit idx of message seq from input src to node dst.
  function automatic logic [63:0] payload(int src, int seq, int idx, int dst);
    logic [31:0] h = 32'(src * 32'h9E3779B1 + seq * 32'h85EBCA77 + idx * 32'hC2B2AE3D + dst);
    return {h, 16'(seq), 7'd0, 2'(idx), 3'(src), 4'(dst)};
  endfunction

  function automatic int exp_port(int dst);
    int dx = dst % MESH_X, dy = dst / MESH_X;
    if (dx > SX) return PORT_E;
    if (dx < SX) return PORT_W;
    if (dy > SY) return PORT_N;
    if (dy < SY) return PORT_S;
    return PORT_L;
  endfunction

  // ---------------------------------------------------------------- senders
  flit_t tx_q [NPORTS][$];
  int    sent_msgs = 0;
  bit    corrupt [NPORTS];
  bit    rate_err = 0;
  int    rate_valid = 100;

  task automatic queue_msg(int src, int seq, int dst);
    for (int k = 0; k < MSG_FLITS; k++) begin
      flit_t f;
      f.head = (k == 0);
      f.tail = (k == MSG_FLITS - 1);
      f.data = payload(src, seq, k, dst);
      f.par  = ^f.data;
      tx_q[src].push_back(f);
    end
    sent_msgs++;
  endtask

  // ---------------------------------------------------------------- receivers
  bit in_msg [NPORTS];
  int cur_src [NPORTS], cur_seq [NPORTS], next_idx [NPORTS];
  int last_seq [NPORTS][NPORTS];
  int rcvd_msgs = 0;
  bit rate_bp = 0;
  int head_out_cyc = -1, tail_out_cyc = -1, head_in_cyc = -1;

  task automatic receive(int o, flit_t f);
    int src = int'(f.data[6:4]);
    int idx = int'(f.data[8:7]);
    int seq = int'(f.data[31:16]);
    int dst = int'(f.data[3:0]);
    chk(f.data == payload(src, seq, idx, dst), "payload");
    chk(f.par == ^payload(src, seq, idx, dst), "parity bit carried");
    chk(f.head == (idx == 0) && f.tail == (idx == MSG_FLITS - 1), "head/tail");
    if (f.head) begin
      chk(!in_msg[o], "message interleaved");
      chk(exp_port(dst) == o, "route");
      chk(seq > last_seq[src][o], "message order");
      last_seq[src][o] = seq;
      in_msg[o] = 1; cur_src[o] = src; cur_seq[o] = seq; next_idx[o] = 1;
    end else begin
      chk(in_msg[o] && src == cur_src[o] && seq == cur_seq[o] && idx == next_idx[o],
          "flit sequence");
      next_idx[o]++;
      if (f.tail) begin
        in_msg[o] = 0;
        rcvd_msgs++;
      end
    end
    if (src == PORT_W && seq == 0) begin
      if (f.head) head_out_cyc = cyc;
      if (f.tail) tail_out_cyc = cyc;
    end
  endtask

  // One cycle: drive at the falling edge, evaluate, commit at the rising edge.
  task automatic step();
    bit in_fire [NPORTS];
    bit out_fire [NPORTS];
    flit_t got [NPORTS];
    @(negedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = tx_q[i].size() > 0 && (($urandom % 100) < rate_valid || in_valid[i]);
      corrupt[i]  = rate_err && in_valid[i] && ($urandom % 100) < 8;
      in_flit[i]  = tx_q[i].size() > 0 ? tx_q[i][0] : '0;
      if (corrupt[i]) begin
        int b = $urandom % 64;
        in_flit[i].data[b] = ~in_flit[i].data[b];
      end
      out_ready[i]  = !rate_bp || ($urandom % 100) < 50;
      err_inject[i] = rate_err && ($urandom % 100) < 8;
    end
    err_bit = 6'($urandom);
    #1;
    for (int i = 0; i < NPORTS; i++) begin
      chk(lef[i] == (in_valid[i] && corrupt[i]), "lef");
      if (lef[i]) begin
        n_lef++;
        chk(!in_ready[i], "flit with link error accepted");
      end
      if (in_valid[i] && !in_ready[i] && !lef[i]) n_full_stall++;
      in_fire[i] = in_valid[i] && in_ready[i];
      if (in_fire[i] && tx_q[i][0].head && i == PORT_W && head_in_cyc < 0) head_in_cyc = cyc;
      chk(!sef[i] || err_inject[i], "sef without injected error");
      if (sef[i]) n_sef++;
      if (err_inject[i]) chk(!out_valid[i], "flit sent with injected error");
      out_fire[i] = out_valid[i] && out_ready[i];
      got[i] = out_flit[i];
    end
    @(posedge clk);
    for (int i = 0; i < NPORTS; i++) begin
      if (in_fire[i]) void'(tx_q[i].pop_front());
      else if (in_valid[i] && corrupt[i]) n_retry++;
      if (out_fire[i]) receive(i, got[i]);
    end
    cyc++;
  endtask

  int seqs [NPORTS];

  initial begin
    foreach (in_valid[i]) begin
      in_valid[i] = 0; in_flit[i] = '0; out_ready[i] = 1; err_inject[i] = 0;
      in_msg[i] = 0; seqs[i] = 0;
      foreach (last_seq[i][o]) last_seq[i][o] = -1;
    end
    err_bit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Directed: one message west -> east on an idle switch.
    queue_msg(PORT_W, seqs[PORT_W]++, node_id(3, 1));
    repeat (10) step();
    chk(head_in_cyc >= 0 && head_out_cyc == head_in_cyc + 1, "one-cycle switch traversal");
    chk(tail_out_cyc == head_out_cyc + MSG_FLITS - 1, "one flit per cycle");
    $display("latency: head accepted cycle %0d, leaves cycle %0d, tail leaves cycle %0d",
             head_in_cyc, head_out_cyc, tail_out_cyc);

    // Random traffic with back-pressure and injected errors.
    rate_bp = 1; rate_err = 1; rate_valid = 70;
    for (int m = 0; m < MSGS_PER_INPUT; m++)
      for (int i = 0; i < NPORTS; i++)
        queue_msg(i, seqs[i]++, $urandom % NODES);
    for (int c = 0; c < 20000; c++) begin
      bit busy;
      busy = 0;
      for (int i = 0; i < NPORTS; i++) if (tx_q[i].size() > 0) busy = 1;
      if (!busy && rcvd_msgs == sent_msgs) break;
      step();
    end
    rate_err = 0; rate_bp = 0;
    repeat (20) step();

    chk(rcvd_msgs == sent_msgs, "all messages delivered");
    chk(n_lef > 0, "link errors seen");
    chk(n_sef > 0, "switch errors seen");
    chk(n_full_stall > 0, "buffer-full stall seen");
    chk(n_retry > 0, "retransmission seen");
    $display("messages sent %0d received %0d; lef %0d sef %0d full-stalls %0d retries %0d",
             sent_msgs, rcvd_msgs, n_lef, n_sef, n_full_stall, n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
