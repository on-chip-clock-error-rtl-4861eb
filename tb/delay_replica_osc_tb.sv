// Self-checking testbench of the delay_replica_osc model. With en low the
// output must stay low. With en high it must oscillate with a period of
// twice the variable delay at the applied control voltage; the period is
// measured over 5 cycles at several reference voltages and converted back
// to a delay, as an off-chip frequency reading would.
module delay_replica_osc_tb;
  timeunit 1ps; timeprecision 1fs;
  import vcdl_ref_pkg::*;

  int checks = 0, failures = 0;
  logic en = 1'b0, osc;
  real  vctrl = 0.91;
  realtime t0;
  int edges;

  delay_replica_osc dut (.vctrl(vctrl), .en(en), .osc(osc));

  always @(posedge osc) edges++;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    checks++;
    if (osc !== 1'b0 || edges != 0) begin
      failures++;
      $display("FAIL oscillates while disabled");
    end
    en = 1'b1;
    foreach (REF_V[i]) begin
      real td;
      if (i % 3 != 0 && i != NREF - 1) continue;
      vctrl = REF_V[i];
      repeat (3) @(posedge osc);      // settle after the voltage change
      t0 = $realtime;
      repeat (5) @(posedge osc);
      td = ($realtime - t0) / 10.0;   // 5 periods, each 2 * td
      checks++;
      if (td < REF_PS[i] - 0.002 || td > REF_PS[i] + 0.002) begin
        failures++;
        $display("FAIL vctrl=%0.3f: delay from period %0.3f ps expected %0.3f ps", REF_V[i], td, REF_PS[i]);
      end
    end
    en = 1'b0;
    #3000;
    edges = 0;
    #5000;
    checks++;
    if (osc !== 1'b0 || edges != 0) begin
      failures++;
      $display("FAIL does not stop when disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
