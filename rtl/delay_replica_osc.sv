// Behavioural model (not synthesizable) of the delay-measurement replica.
//
// A copy of the variable delay, driven by the same control voltage as the
// delay it stands for, is closed into a ring oscillator so that the delay
// in use can be read while measuring, without calibration: the ring
// inverts once per pass, so osc has a period of twice the replica's delay,
// 2 * td. The document names the replica and its purpose; the ring's
// closing gate is this design's choice: an AND of en with the inverted
// output, which holds the ring at 0 while en is low and starts it cleanly
// when en rises. The delay of that gate is taken as zero.
//
// Interface: vctrl (V), en in; osc out.
module delay_replica_osc #(
  parameter int unsigned NUM_STAGES = clk_err_pkg::NUM_STAGES_DEFAULT
) (
  input  real  vctrl,
  input  logic en,
  output logic osc
);
  timeunit 1ps; timeprecision 1fs;

  logic ring_in;

  assign ring_in = en & ~osc;

  variable_delay #(.NUM_STAGES(NUM_STAGES)) u_replica (
    .din   (ring_in),
    .vctrl (vctrl),
    .dout  (osc)
  );

endmodule
