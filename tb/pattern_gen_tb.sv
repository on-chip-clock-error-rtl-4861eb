// Self-checking testbench of pattern_gen: after reset q1 must be 0 and then
// alternate 1, 0, 1, ... on every rising edge of clk1; a second reset must
// restart the sequence.
module pattern_gen_tb;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk1 = 1'b0, rst_n = 1'b1, q1;

  pattern_gen dut (.clk1(clk1), .rst_n(rst_n), .q1(q1));

  always #500 clk1 = ~clk1;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: q1=%0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // reset asserted with a falling edge so the asynchronous reset fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk1);
    #100 check(q1, 1'b0, "reset value");
    rst_n = 1'b1;
    for (int k = 1; k <= 40; k++) begin
      @(posedge clk1); #100;
      check(q1, logic'(k % 2), "toggle");
    end
    // reset in the middle of the sequence
    #100 rst_n = 1'b0;
    #100 check(q1, 1'b0, "async reset");
    @(negedge clk1) rst_n = 1'b1;
    for (int k = 1; k <= 6; k++) begin
      @(posedge clk1); #100;
      check(q1, logic'(k % 2), "toggle after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
