// Exhaustive test of 1.0 - x at both widths used: 9 bits (INC, 1.0 = 256)
// and 5 bits (Neg, 1.0 = 16).
module tb_one_minus;
  logic [8:0] x9, y9;
  logic [4:0] x5, y5;
  int checks = 0, failures = 0;
  one_minus #(.WIDTH(9)) dut9 (.x(x9), .y(y9));
  one_minus #(.WIDTH(5)) dut5 (.x(x5), .y(y5));
  initial begin
    for (int i = 0; i <= 256; i++) begin
      x9 = 9'(i);
      #1;
      checks++;
      if (int'(y9) != 256 - i) begin failures++; $display("INC(%0d) = %0d", i, y9); end
    end
    for (int i = 0; i <= 16; i++) begin
      x5 = 5'(i);
      #1;
      checks++;
      if (int'(y5) != 16 - i) begin failures++; $display("Neg(%0d) = %0d", i, y5); end
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
