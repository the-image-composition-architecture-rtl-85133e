// Exhaustive test of A-: every internal alpha 0..256 against a - (a >= 128),
// and the round trip A- (A+ (a)) = a for all 8-bit values.
module tb_alpha_dec;
  logic [8:0] a;
  logic [7:0] y;
  int checks = 0, failures = 0;
  alpha_dec dut (.alpha_int(a), .alpha_ext(y));
  initial begin
    for (int i = 0; i <= 256; i++) begin
      a = 9'(i);
      #1;
      checks++;
      if (int'(y) != (i >= 128 ? i - 1 : i)) begin
        failures++;
        $display("A-(%0d) = %0d", i, y);
      end
    end
    for (int i = 0; i < 256; i++) begin
      a = 9'(i >= 128 ? i + 1 : i);
      #1;
      checks++;
      if (int'(y) != i) begin
        failures++;
        $display("round trip of %0d gave %0d", i, y);
      end
    end
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
