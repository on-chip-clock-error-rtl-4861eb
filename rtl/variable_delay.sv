// Behavioural model (not synthesizable) of one variable delay of the
// integrated prototype: NUM_STAGES voltage-controlled delay elements in
// series sharing one control voltage. Two elements (the default) give the
// published range of one delay, about 334 ps to 436 ps for vctrl from 1.2 V
// down to 0.85 V. One instance delays the test pattern (td1), another the
// receiving clock clk2 (td2); the difference td1 - td2 is the effective
// delay between the two clock domains, positive or negative.
//
// Interface: din in, vctrl (V) in, dout out; dout follows din after
// NUM_STAGES/2 times clk_err_pkg::vcdl_delay_ps(vctrl).
module variable_delay #(
  parameter int unsigned NUM_STAGES = clk_err_pkg::NUM_STAGES_DEFAULT
) (
  input  logic din,
  input  real  vctrl,
  output logic dout
);
  timeunit 1ps; timeprecision 1fs;

  logic [NUM_STAGES:0] tap;

  assign tap[0] = din;

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_stage
    vc_delay_element u_elem (
      .din   (tap[s]),
      .vctrl (vctrl),
      .dout  (tap[s+1])
    );
  end

  assign dout = tap[NUM_STAGES];

endmodule
