// tb_fault_map: applies random single error flags and checks the sticky
// fault marks and the derived usable-link map against a model kept in the
// testbench, which works out the far end of each link from mesh coordinates.
module tb_fault_map;
  import cdd_pkg::*;
  logic clk = 0, rst_n = 0, clear;
  logic lef [NODES][NPORTS];
  logic sef [NODES][NPORTS];
  logic rx_err [NODES];
  logic link_faulty [NODES][NPORTS];
  logic switch_faulty [NODES];
  logic eject_faulty [NODES];
  logic link_usable [NODES][NPORTS];
  logic eject_usable [NODES];
  bit m_link [NODES][NPORTS];
  bit m_sw [NODES];
  bit m_ej [NODES];
  int checks = 0, failures = 0, n_unusable_by_far_end = 0;

  fault_map dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int far(int n, int p);
    int x = n % MESH_X, y = n / MESH_X;
    case (p)
      0: if (y < MESH_Y - 1) return n + MESH_X;
      1: if (x < MESH_X - 1) return n + 1;
      2: if (y > 0) return n - MESH_X;
      3: if (x > 0) return n - 1;
      default: ;
    endcase
    return n;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0;
    for (int n = 0; n < NODES; n++) begin
      rx_err[n] = 0;
      for (int p = 0; p < NPORTS; p++) begin lef[n][p] = 0; sef[n][p] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 600; c++) begin
      int kind, n, p;
      kind = $urandom % 10;
      n    = $urandom % NODES;
      p    = $urandom % NPORTS;
      @(negedge clk);
      for (int a = 0; a < NODES; a++) begin
        rx_err[a] = 0;
        for (int b = 0; b < NPORTS; b++) begin lef[a][b] = 0; sef[a][b] = 0; end
      end
      clear = (c % 100) == 99;
      if (kind < 4) lef[n][p] = 1;
      else if (kind == 4) sef[n][p] = 1;
      else if (kind == 5) rx_err[n] = 1;
      @(posedge clk);
      if (clear) begin
        foreach (m_link[a, b]) m_link[a][b] = 0;
        foreach (m_sw[a]) begin m_sw[a] = 0; m_ej[a] = 0; end
      end else begin
        if (kind < 4) m_link[n][p] = 1;
        else if (kind == 4) m_sw[n] = 1;
        else if (kind == 5) m_ej[n] = 1;
      end
      #1;
      for (int a = 0; a < NODES; a++) begin
        chk(switch_faulty[a] == m_sw[a], "switch mark");
        chk(eject_faulty[a] == m_ej[a], "ejection link mark");
        chk(eject_usable[a] == !(m_ej[a] || m_sw[a]), "ejection link usable");
        for (int b = 0; b < NPORTS; b++) begin
          bit usable;
          usable = !(m_link[a][b] || m_sw[a] || m_sw[far(a, b)]);
          chk(link_faulty[a][b] == m_link[a][b], "link mark");
          chk(link_usable[a][b] == usable, "link usable");
          if (!m_link[a][b] && !m_sw[a] && m_sw[far(a, b)]) n_unusable_by_far_end++;
        end
      end
    end
    chk(n_unusable_by_far_end > 0, "link disabled by faulty far-end switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
