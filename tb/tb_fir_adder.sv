// tb_fir_adder - random and corner-case check of the stage adder (16-bit product
// plus 19-bit partial sum), against an integer sum computed here.
module tb_fir_adder;
  localparam int PW = 16, W = 19;
  logic [PW-1:0] prod;
  logic [W-1:0]  acc, sum;
  int checks = 0, failures = 0;

  fir_adder #(.PROD_W(PW), .W(W)) dut (.prod(prod), .acc(acc), .sum(sum));

  task automatic apply(int unsigned pv, int unsigned av);
    int unsigned expect_sum;
    prod = PW'(pv);
    acc  = W'(av);
    #1;
    expect_sum = (int'(prod) + int'(acc)) % (1 << W);
    checks++;
    if (int'(sum) != int'(expect_sum)) begin
      failures++;
      $display("add %0d+%0d gave %0d expected %0d", prod, acc, sum, expect_sum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(32'hFFFF, 0);
    apply(0, 32'h7FFFF);
    apply(32'hFFFF, 32'h3FFFF);
    apply(32'hFFFF, 32'h70000);
    for (int i = 0; i < 5000; i++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
