// Test pattern generator (register R1) of the clock-error measurement circuit.
//
// A single D flip-flop clocked by the rising edge of clk1 whose inverted
// output is fed back to its D input, so q1 toggles on every clk1 edge and
// carries the periodic sequence ...1010... synchronous with clk1. This is the
// whole generator as described; the asynchronous active-low reset (q1 = 0)
// is an addition so that the sequence starts from a known value.
//
// Interface: clk1, rst_n in; q1 out, changing right after each rising clk1
// edge (one bit per clk1 cycle).
module pattern_gen (
  input  logic clk1,
  input  logic rst_n,
  output logic q1
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk1 or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= ~q1;
  end

endmodule
