// tb_fir_delay - checks the z^-1 element: reset clears it, it loads only when en is
// high, and q shows d one clock later. A reference register is modelled here.
module tb_fir_delay;
  localparam int W = 19;
  logic         clk = 0, rst, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  fir_delay #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; d = '1;
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset did not clear q"); end
    model = '0;
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      en = ($urandom % 3) != 0;
      d  = W'($urandom);
      rst = ($urandom % 97) == 0;
      @(posedge clk);
      if (rst) model = '0;
      else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: q=%h expected %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
