// Sequencer: the modulo-six pixel clock of the Compositor.
//
// A binary up-counter runs 0-1-2-3-4-5-0 and is decoded into six one-hot
// phase enables, phase[n] being high during cycle n of each pixel. Cycle 0 is
// the clock during which a pixel's Z low byte is on the data input pins. The
// counter, its range and the decoding into six enables follow the thesis.
//
// START_ROW high during a clock makes the next clock cycle 0 of the first pixel
// of a scan line; RESET (synchronous) does the same. The thesis drives load
// enables and mux selects from two register sets clocked on opposite edges;
// this design clocks everything on the rising edge, so one decoded set serves
// both purposes: a register enabled by phase[n] loads at the end of cycle n.
module sequencer
  import comp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,        // synchronous reset, active high
  input  logic       start_row,  // next cycle is cycle 0 of a new scan line
  output logic [2:0] count,      // current cycle number within the pixel, 0..5
  output logic [5:0] phase,      // one-hot decode of count
  output logic       pixel_end   // high during cycle 5
);

  always_ff @(posedge clk) begin
    if (rst || start_row)
      count <= 3'd0;
    else if (count == 3'(PIXEL_CLOCKS - 1))
      count <= 3'd0;
    else
      count <= count + 3'd1;
  end

  always_comb begin
    phase = '0;
    for (int i = 0; i < int'(PIXEL_CLOCKS); i++)
      phase[i] = (count == 3'(i));
  end

  assign pixel_end = phase[PIXEL_CLOCKS-1];

endmodule
