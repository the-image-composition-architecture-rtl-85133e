// Test of the previous-row Z buffer: random writes and reads against a model,
// read data valid in the same clock as its address, write at the clock edge.
module tb_prev_z_ram;
  localparam int DEPTH = 2 * 513;
  logic clk = 1'b0, wr = 1'b0;
  logic [13:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  prev_z_ram dut (.clk, .addr, .wr_strb(wr), .wdata, .rdata);
  initial begin
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr  = 14'($urandom % DEPTH);
      wr    = 1'($urandom % 2);
      wdata = 8'($urandom);
      #1;
      if (!wr && written[addr]) begin
        checks++;
        if (rdata != model[addr]) begin failures++; $display("addr %0d read %h expected %h", addr, rdata, model[addr]); end
      end
      @(posedge clk);
      if (wr) begin model[addr] = wdata; written[addr] = 1'b1; end
    end
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
