// Exhaustive test of the beta adder: all 512 combinations of the nine sign
// bits against corners + 2*edges + 4*centre sixteenths (weight = sign 0).
module tb_beta_adder;
  logic [3:0] cs, es;
  logic       ce;
  logic [4:0] beta;
  int checks = 0, failures = 0;
  beta_adder dut (.corner_sign(cs), .edge_sign(es), .centre_sign(ce), .beta);
  initial begin
    for (int v = 0; v < 512; v++) begin
      automatic int e;
      {ce, es, cs} = 9'(v);
      e = (ce ? 0 : 4);
      for (int i = 0; i < 4; i++) begin
        if (!cs[i]) e += 1;
        if (!es[i]) e += 2;
      end
      #1;
      checks++;
      if (int'(beta) != e) begin failures++; $display("signs %b: beta %0d expected %0d", v[8:0], beta, e); end
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
