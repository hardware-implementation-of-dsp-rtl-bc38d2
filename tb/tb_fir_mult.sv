// tb_fir_mult - exhaustive check of the tap multiplier at its default 8 x 8 bits.
// Every pair of unsigned operands is applied and the product compared with the
// integer product computed here.
module tb_fir_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  fir_mult #(.A_W(8), .B_W(8)) dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("mult %0d*%0d gave %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
