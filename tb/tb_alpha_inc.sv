// Exhaustive test of A+: every 8-bit alpha against a + (a >= 128).
module tb_alpha_inc;
  logic [7:0] a;
  logic [8:0] y;
  int checks = 0, failures = 0;
  alpha_inc dut (.alpha_ext(a), .alpha_int(y));
  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (int'(y) != (i >= 128 ? i + 1 : i)) begin
        failures++;
        $display("A+(%0d) = %0d", i, y);
      end
    end
    checks++;
    if (a != 8'd255 || y != 9'd256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
