// Test of the Z circuit: shifts only when enabled, holds otherwise, resets.
module tb_z_pair;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [7:0] d, q1, q2;
  logic [7:0] m1, m2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  z_pair dut (.clk, .rst, .en, .d, .q1, .q2);
  initial begin
    d = 8'h55;
    @(posedge clk); #1;
    checks++;
    if (q1 != 0 || q2 != 0) failures++;
    rst = 1'b0;
    m1 = 0; m2 = 0;
    for (int i = 0; i < 200; i++) begin
      en = 1'($urandom % 2);
      d  = 8'($urandom);
      @(posedge clk);
      if (en) begin m2 = m1; m1 = d; end
      #1;
      checks++;
      if (q1 != m1 || q2 != m2) begin
        failures++;
        $display("step %0d: q1=%h q2=%h expected %h %h", i, q1, q2, m1, m2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
