// tb_rr_arbiter: random requests and random 'advance' against a reference
// round-robin model; checks the one-hot grant, its index, and that a
// continuously requesting port is served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [2:0]   grant_idx;
  logic advance;
  int ptr_model = 0;
  int checks = 0, failures = 0;
  int waiting [N];

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s req=%b grant=%b ptr=%0d", what, req, grant, ptr_model);
    end
  endtask

  initial begin
    req = '0; advance = 0;
    foreach (waiting[k]) waiting[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      req     = N'($urandom);
      if (c > 1500) req = req | 5'b10001;       // two persistent requesters
      advance = ($urandom % 4) != 0;
      #1;
      begin
        int exp_idx, i;
        exp_idx = -1;
        for (int k = 0; k < N; k++) begin
          i = (ptr_model + k) % N;
          if (exp_idx < 0 && req[i]) exp_idx = i;
        end
        if (exp_idx < 0) chk(grant == '0, "grant without request");
        else begin
          chk(grant == (N'(1) << exp_idx), "grant vector");
          chk(int'(grant_idx) == exp_idx, "grant index");
        end
        @(posedge clk);
        if (advance && exp_idx >= 0) ptr_model = (exp_idx + 1) % N;
        for (int k = 0; k < N; k++) begin
          if (req[k] && !(advance && exp_idx == k)) begin
            if (advance && exp_idx >= 0) waiting[k]++;
          end else waiting[k] = 0;
          chk(waiting[k] < N, "starvation");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
