// Self-checking testbench of interval_counter (C2). The default 8-bit
// counter must raise overflow once every 255 clk2 cycles, the first time 255
// cycles after reset, with count running 1..255; a 3-bit instance must do
// the same with a period of 7.
module interval_counter_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int T = 1000;

  int checks = 0, failures = 0;
  logic clk2 = 1'b0, rst_n = 1'b1;
  logic [7:0] count8;
  logic [2:0] count3;
  logic ovf8, ovf3;
  int cyc = 0, last8 = 0, last3 = 0, n8 = 0, n3 = 0;

  interval_counter dut8 (.clk2(clk2), .rst_n(rst_n), .count(count8), .overflow(ovf8));
  interval_counter #(.N_BITS(3)) dut3 (.clk2(clk2), .rst_n(rst_n), .count(count3), .overflow(ovf3));

  always #(T / 2) clk2 = ~clk2;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // reset asserted with a falling edge so the asynchronous reset fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    #(T * 3000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk2) rst_n = 1'b1;
    // cyc counts rising edges since reset release; the edge at which the
    // counter shows overflow is the last of its window.
    while (cyc < 4 * 255 + 3) begin
      @(posedge clk2);
      cyc++;
      #1;
      chk(int'(count8) == ((cyc % 255) + 1), "8-bit count value");
      chk(int'(count3) == ((cyc % 7) + 1), "3-bit count value");
      if (ovf8) begin
        chk(cyc - last8 == 255 || (n8 == 0 && cyc == 254), "8-bit overflow period");
        last8 = cyc; n8++;
      end
      if (ovf3) begin
        chk(cyc - last3 == 7 || (n3 == 0 && cyc == 6), "3-bit overflow period");
        last3 = cyc; n3++;
      end
      chk(ovf8 == (count8 == 8'd255), "8-bit overflow flag");
    end
    chk(n8 == 4, "number of 8-bit overflows");
    chk(n3 == (4 * 255 + 3 + 1) / 7, "number of 3-bit overflows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
