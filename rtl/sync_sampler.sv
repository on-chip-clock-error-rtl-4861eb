// Receiver front end of the processing unit: registers R2..R5 and the XNOR.
//
// The incoming pattern d2 (the ...1010... sequence after the pattern-path
// delay) is sampled by a four-stage shift register whose stages alternate
// between the two edges of clk2: R2 on the rising edge, R3 on the falling
// edge, R4 on the rising edge, R5 on the falling edge. The half-cycle
// stages give each sample time to resolve before it is used. Q3 and Q5 are
// two consecutive received bits (R5 is R3 one clk2 cycle later), so their
// XNOR is 1 exactly when the received sequence holds two equal bits in a
// row, i.e. when the sign of the clock error changed between two cycles.
// Structure and edges follow the published circuit; the reset is added
// (all stages 0, err_det = 1 during reset).
//
// Timing: a bit captured by R2 at rising edge k reaches Q3 at the falling
// edge k and Q5 at falling edge k+1; err_det changes only after falling
// edges, and is consumed by counters on the rising edge, half a cycle later.
module sync_sampler (
  input  logic clk2,
  input  logic rst_n,
  input  logic d2,
  output logic err_det
);
  timeunit 1ps; timeprecision 1fs;

  logic q2, q3, q4, q5;

  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n) begin
      q2 <= 1'b0;
      q4 <= 1'b0;
    end else begin
      q2 <= d2;
      q4 <= q3;
    end
  end

  always_ff @(negedge clk2 or negedge rst_n) begin
    if (!rst_n) begin
      q3 <= 1'b0;
      q5 <= 1'b0;
    end else begin
      q3 <= q2;
      q5 <= q4;
    end
  end

  assign err_det = ~(q3 ^ q5);

endmodule
