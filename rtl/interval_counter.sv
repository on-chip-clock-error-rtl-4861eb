// Window counter C2 of the processing unit.
//
// An N_BITS-bit counter advanced on every rising edge of clk2 that defines the
// measurement window: it runs through 1, 2, .., 2**N_BITS-1 and back to 1, so
// overflow is high during one cycle in every 2**N_BITS-1 (255 cycles for the
// default 8 bits). Counting from 1 rather than 0, so that the window is
// 2**N_BITS-1 and not 2**N_BITS cycles long, is this design's way of meeting
// that window length. After reset the count is 1, so the first window is
// also exactly 2**N_BITS-1 cycles long.
//
// Interface: clk2, rst_n in; count (current position in the window) and
// overflow (count == 2**N_BITS-1, the last cycle of the window) out.
module interval_counter #(
  parameter int unsigned N_BITS = clk_err_pkg::N_BITS_DEFAULT
) (
  input  logic              clk2,
  input  logic              rst_n,
  output logic [N_BITS-1:0] count,
  output logic              overflow
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [N_BITS-1:0] ONE = N_BITS'(1);

  assign overflow = &count;

  always_ff @(posedge clk2 or negedge rst_n) begin
    if (!rst_n)        count <= ONE;
    else if (overflow) count <= ONE;
    else               count <= count + ONE;
  end

endmodule
