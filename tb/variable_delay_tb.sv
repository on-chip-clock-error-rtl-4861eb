// Self-checking testbench of the variable_delay model (two elements). The
// measured delay of rising and falling edges must match the reference delay
// at every reference control voltage, and a pulse train sent through it
// must come out unchanged in width and shifted by that delay. The test also
// checks the differential use: two delays at 0.91 V and 0.955 V differ by
// 20.81 ps.
module variable_delay_tb;
  timeunit 1ps; timeprecision 1fs;
  import vcdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic din = 1'b0, dout, din_b = 1'b0, dout_b;
  real  vctrl = 0.9, vctrl_b = 0.955;
  realtime t_in, t_a, t_b;

  variable_delay dut (.din(din), .vctrl(vctrl), .dout(dout));
  variable_delay dut_b (.din(din_b), .vctrl(vctrl_b), .dout(dout_b));

  task automatic chk_near(input real got, input real exp_ps, input string what);
    checks++;
    if (got < exp_ps - 0.002 || got > exp_ps + 0.002) begin
      failures++;
      $display("FAIL %s: %0.3f ps expected %0.3f ps", what, got, exp_ps);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < NREF; i++) begin
      vctrl = REF_V[i];
      #2000;
      for (int e = 0; e < 2; e++) begin
        din = ~din;
        t_in = $realtime;
        @(dout);
        chk_near($realtime - t_in, REF_PS[i], $sformatf("delay at %0.3f V", REF_V[i]));
        #2000;
      end
    end
    // pulse train with 1 ns period at 0.91 V: each output edge one delay late
    vctrl = 0.91;
    #2000;
    t_in = $realtime;
    fork
      for (int k = 0; k < 10; k++) begin
        din = ~din;
        #500;
      end
      for (int k = 0; k < 10; k++) begin
        @(dout);
        chk_near($realtime - t_in - 500.0 * k, REF_PS[8], "pulse-train edge");
      end
    join
    #8000;
    // differential pair
    vctrl = 0.91;
    vctrl_b = 0.955;
    #2000;
    din = ~din;
    din_b = ~din_b;
    fork
      begin @(dout);   t_a = $realtime; end
      begin @(dout_b); t_b = $realtime; end
    join
    chk_near(t_a - t_b, 20.81, "differential delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
