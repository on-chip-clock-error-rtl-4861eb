// Self-checking testbench of the vc_delay_element model. For each reference
// control voltage it sends a rising and a falling edge through the element
// and measures the delay, which must be half of the two-element delay of
// that voltage (within 1 fs rounding). It also checks one interpolated
// point, 0.865 V, and that a higher voltage gives a shorter delay.
module vc_delay_element_tb;
  timeunit 1ps; timeprecision 1fs;
  import vcdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic din = 1'b0, dout;
  real  vctrl = 0.9;
  realtime t_in, t_out;

  vc_delay_element dut (.din(din), .vctrl(vctrl), .dout(dout));

  task automatic measure(input real v, input real exp_ps, input string what);
    real got;
    vctrl = v;
    #1000;
    for (int edge_n = 0; edge_n < 2; edge_n++) begin
      din = ~din;
      t_in = $realtime;
      @(dout);
      t_out = $realtime;
      got = t_out - t_in;
      checks++;
      if (got < exp_ps - 0.002 || got > exp_ps + 0.002 || dout !== din) begin
        failures++;
        $display("FAIL %s: vctrl=%0.3f delay=%0.3f ps expected %0.3f ps", what, v, got, exp_ps);
      end
      #1000;
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
    for (int i = 0; i < NREF; i++) measure(REF_V[i], REF_PS[i] / 2.0, "table point");
    measure(0.865, (REF_PS[1] + REF_PS[2]) / 4.0, "interpolated point");
    // monotonic: higher control voltage, shorter delay
    for (int i = 1; i < NREF; i++) begin
      checks++;
      if (!(clk_err_pkg::vcdl_delay_ps(REF_V[i]) < clk_err_pkg::vcdl_delay_ps(REF_V[i-1]))) begin
        failures++;
        $display("FAIL delay not decreasing at %0.3f V", REF_V[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
