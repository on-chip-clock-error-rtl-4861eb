// Error counter C1 of the processing unit.
//
// Counts, on the rising edge of clk2, the cycles in which the integrity
// detector (err_det) reports two equal successive bits. When the window
// counter overflows (restart), the count is taken over by the output
// register in the same edge and C1 starts the next window already holding
// the event of that edge (0 or 1), so that no cycle is lost between windows.
// Clearing at the window end is this design's choice; the published circuit
// only states that C1 counts the events and that its value is stored at the
// overflow of the window counter. A window has 2**N_BITS-1 cycles, so the
// count never exceeds 2**N_BITS-1 and cannot wrap.
//
// Interface: clk2, rst_n, err_det, restart in; count out (errors so far in
// the current window).
module error_counter #(
  parameter int unsigned N_BITS = clk_err_pkg::N_BITS_DEFAULT
) (
  input  logic              clk2,
  input  logic              rst_n,
  input  logic              err_det,
  input  logic              restart,
  output logic [N_BITS-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n)       count <= '0;
    else if (restart) count <= N_BITS'(err_det);
    else if (err_det) count <= count + N_BITS'(1);
  end

endmodule
