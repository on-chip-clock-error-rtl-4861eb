// Self-checking testbench of sync_sampler. The received bit stream b[k] is
// set before rising edge k of clk2. After falling edge k the detector must
// show b[k] == b[k-1] (two equal successive bits = integrity violated),
// with b[0] = b[-1] = 0 standing for the reset state. The stream mixes long
// clean ...1010... stretches, forced repetitions and random bits.
module sync_sampler_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int NBITS_SEQ = 600;
  localparam int T = 1000;

  int checks = 0, failures = 0;
  logic clk2 = 1'b0, rst_n = 1'b1, d2 = 1'b0, err_det;
  logic b [-1:NBITS_SEQ];
  int n_err = 0;

  sync_sampler dut (.clk2(clk2), .rst_n(rst_n), .d2(d2), .err_det(err_det));

  // reset asserted with a falling edge so the asynchronous reset fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    #(T * (NBITS_SEQ + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b[-1] = 1'b0;
    b[0]  = 1'b0;
    for (int k = 1; k <= NBITS_SEQ; k++) begin
      if (k < 200)      b[k] = ~b[k-1];                             // clean pattern
      else if (k < 400) b[k] = ($urandom_range(0, 9) == 0) ? b[k-1] : ~b[k-1];
      else              b[k] = logic'($urandom_range(0, 1));
    end
    #(T) rst_n = 1'b1;
    #(T / 4);
    for (int k = 1; k <= NBITS_SEQ; k++) begin
      d2 = b[k];
      #(T / 4) clk2 = 1'b1;
      #(T / 2) clk2 = 1'b0;
      #(T / 4);
      checks++;
      if (err_det !== (b[k] == b[k-1])) begin
        failures++;
        $display("FAIL bit %0d: err_det=%0d expected %0d", k, err_det, b[k] == b[k-1]);
      end
      if (b[k] == b[k-1]) n_err++;
    end
    // both outcomes must have been exercised
    checks++;
    if (n_err == 0 || n_err == NBITS_SEQ) begin
      failures++;
      $display("FAIL stimulus produced %0d errors", n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
