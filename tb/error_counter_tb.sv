// Self-checking testbench of error_counter (C1): random detection events and
// window restarts; after every rising clk2 edge the count must equal a
// reference that restarts from the event of the restart edge and otherwise
// adds one per event. Also checks that a window full of events counts up to
// 2**N_BITS-1.
module error_counter_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int N_BITS = 8;
  localparam int T = 1000;

  int checks = 0, failures = 0;
  logic clk2 = 1'b0, rst_n = 1'b1, err_det = 1'b0, restart = 1'b0;
  logic [N_BITS-1:0] count;
  int ref_count = 0;

  error_counter #(.N_BITS(N_BITS)) dut (
    .clk2(clk2), .rst_n(rst_n), .err_det(err_det), .restart(restart), .count(count));

  always #(T / 2) clk2 = ~clk2;

  task automatic step(input logic e, input logic r);
    @(negedge clk2);
    err_det = e;
    restart = r;
    @(posedge clk2);
    if (r) ref_count = int'(e);
    else   ref_count += int'(e);
    #1;
    checks++;
    if (int'(count) != ref_count) begin
      failures++;
      $display("FAIL count=%0d expected %0d (e=%0d r=%0d)", count, ref_count, e, r);
    end
  endtask

  // reset asserted with a falling edge so the asynchronous reset fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    #(T * 5000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk2);
    #1 checks++;
    if (count != '0) begin failures++; $display("FAIL reset value %0d", count); end
    @(negedge clk2) rst_n = 1'b1;
    // random windows
    for (int w = 0; w < 6; w++) begin
      for (int c = 0; c < 40; c++) step(logic'($urandom_range(0, 2) == 0), 1'b0);
      step(1'b1, 1'b1);  // restart with an event
      for (int c = 0; c < 30; c++) step(logic'($urandom_range(0, 1)), 1'b0);
      step(1'b0, 1'b1);  // restart without an event
    end
    // full window: one event in each of 2**N_BITS-1 cycles
    step(1'b1, 1'b1);
    for (int c = 1; c < (1 << N_BITS) - 1; c++) step(1'b1, 1'b0);
    checks++;
    if (int'(count) != (1 << N_BITS) - 1) begin
      failures++;
      $display("FAIL full window count %0d", count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
