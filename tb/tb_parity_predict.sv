// tb_parity_predict: checks the parity prediction block against a bit count.
// Random and corner-case 64-bit words are applied; the expected parity is
// the number of ones modulo two, counted bit by bit in the testbench.
module tb_parity_predict;
  logic [63:0] data;
  logic        parity;
  int checks = 0, failures = 0;

  parity_predict #(.W(64)) dut (.data(data), .parity(parity));

  function automatic logic ref_parity(input logic [63:0] d);
    int ones = 0;
    for (int k = 0; k < 64; k++) if (d[k]) ones++;
    return ones[0];
  endfunction

  task automatic check(input logic [63:0] d);
    data = d;
    #1;
    checks++;
    if (parity !== ref_parity(d)) begin
      failures++;
      $display("FAIL data=%h parity=%b expected=%b", d, parity, ref_parity(d));
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
    check('0);
    check('1);
    for (int k = 0; k < 64; k++) check(64'd1 << k);
    for (int k = 0; k < 500; k++) check({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
