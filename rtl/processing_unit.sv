// Processing unit of the clock-error measurement circuit.
//
// Checks the integrity of the ...1010... pattern received from the clk1
// domain and reports how often it was violated. The front end
// (sync_sampler: R2..R5 and the XNOR) flags every cycle in which two
// successive received bits are equal. The error counter C1 counts these
// flags on the rising clk2 edge; the window counter C2 overflows once every
// 2**N_BITS-1 cycles, and at that edge the output register Rs loads C1
// while C1 restarts with the flag of that same edge, so every cycle's flag
// falls in exactly one window.
// nerr therefore holds Nerr, the number of errors in the last complete
// window of 255 cycles (default N_BITS = 8), and changes only once per
// window, so it can be read off chip at a rate 2**N_BITS lower than clk2.
// The error rate is ER = nerr / (2**N_BITS-1).
//
// The structure follows the published circuit. This design's own choices:
// the active-low asynchronous reset, C1 cleared at each window end, and the
// nerr_update output (C2's overflow), which marks the cycle at whose end Rs
// loads and lets a reader sample nerr safely. The published drawing takes
// Rs's clock from C2's overflow; here the overflow is a load enable on clk2,
// which keeps a single clock and loads at the same edge.
//
// Latency: an error between the bits captured at rising edges k and k+1
// is flagged after falling edge k+1 and counted at rising edge k+2.
module processing_unit #(
  parameter int unsigned N_BITS = clk_err_pkg::N_BITS_DEFAULT
) (
  input  logic              clk2,
  input  logic              rst_n,
  input  logic              d2,
  output logic [N_BITS-1:0] nerr,
  output logic              nerr_update
);
  timeunit 1ps; timeprecision 1fs;

  logic              err_det;
  logic [N_BITS-1:0] c1_count;
  logic [N_BITS-1:0] c2_count;
  logic              c2_overflow;

  sync_sampler u_sampler (
    .clk2    (clk2),
    .rst_n   (rst_n),
    .d2      (d2),
    .err_det (err_det)
  );

  error_counter #(.N_BITS(N_BITS)) u_c1 (
    .clk2    (clk2),
    .rst_n   (rst_n),
    .err_det (err_det),
    .restart (c2_overflow),
    .count   (c1_count)
  );

  interval_counter #(.N_BITS(N_BITS)) u_c2 (
    .clk2     (clk2),
    .rst_n    (rst_n),
    .count    (c2_count),
    .overflow (c2_overflow)
  );

  // Output register Rs.
  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n)           nerr <= '0;
    else if (c2_overflow) nerr <= c1_count;
  end

  assign nerr_update = c2_overflow;

  // C2 position is only needed for its overflow.
  logic unused_c2;
  assign unused_c2 = ^c2_count;

endmodule
