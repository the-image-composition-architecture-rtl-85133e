// Test of the sequencer: counts 0..5 and wraps, one-hot phase decode,
// pixel_end in cycle 5, START_ROW forcing cycle 0 on the next clock from any
// count, and reset.
module tb_sequencer;
  logic clk = 1'b0, rst = 1'b1, start_row = 1'b0;
  logic [2:0] count;
  logic [5:0] phase;
  logic pixel_end;
  int checks = 0, failures = 0;
  int expect_count;

  always #5 clk = ~clk;

  sequencer dut (.clk, .rst, .start_row, .count, .phase, .pixel_end);

  task automatic check_state(int exp);
    checks++;
    if (count != 3'(exp) || phase != 6'(1 << exp) || pixel_end != (exp == 5)) begin
      failures++;
      $display("count=%0d phase=%b pixel_end=%b, expected count %0d", count, phase, pixel_end, exp);
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check_state(0);
    expect_count = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      expect_count = (expect_count + 1) % 6;
      check_state(expect_count);
    end
    // START_ROW from every count value
    for (int s = 0; s < 6; s++) begin
      while (count != 3'(s)) @(negedge clk);
      start_row = 1'b1;
      @(negedge clk);
      start_row = 1'b0;
      check_state(0);
      @(negedge clk);
      check_state(1);
    end
    rst = 1'b1;
    @(negedge clk);
    check_state(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
