// tb_flit_fifo: random push/pop traffic against a queue reference model.
// Checks the head-of-line word, empty and full every cycle, including
// simultaneous read and write on a full FIFO.
module tb_flit_fifo;
  localparam int W = 67, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0;
  int cycles = 0;

  flit_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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
      if (failures < 10) $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cycles = 0; cycles < 4000; cycles++) begin
      @(negedge clk);
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) chk(rd_data == model[0], "head word");
      // bias towards filling in some phases, draining in others
      wr_en   = ($urandom % 100) < ((cycles / 200) % 2 ? 80 : 30);
      rd_en   = ($urandom % 100) < ((cycles / 200) % 2 ? 30 : 80);
      wr_data = {$urandom, $urandom, 3'($urandom)};
      @(posedge clk);
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() > 0;
        do_wr = wr_en && (model.size() < DEPTH || do_rd);
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
