// Test of the core multiplier: a new operand pair every clock, each product
// checked one clock later (two pipeline stages, the second combinational).
// Operands are drawn from 0..256 with 256 (the bypassed 1.0) frequent.
module tb_mult_core;
  logic clk = 1'b0, rst = 1'b1;
  logic [8:0] a, b;
  logic [17:0] p;
  int checks = 0, failures = 0, bypass = 0;
  int pa, pb;

  always #5 clk = ~clk;

  mult_core dut (.clk, .rst, .a, .b, .p);

  function automatic int operand();
    case ($urandom % 6)
      0: return 256;
      1: return 0;
      default: return int'($urandom % 257);
    endcase
  endfunction

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    pa = -1;
    for (int i = 0; i < 2000; i++) begin
      a = 9'(operand());
      b = 9'(operand());
      @(posedge clk);
      #1;
      checks++;
      if (int'(p) != int'(a) * int'(b)) begin
        failures++;
        $display("%0d * %0d gave %0d", a, b, p);
      end
      if (a == 9'd256 || b == 9'd256) bypass++;
      @(negedge clk);
    end
    checks++;
    if (bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
