// Behavioural model (not synthesizable) of one voltage-controlled delay
// element.
//
// The real element is analog: a current-starved inverter (M4/M5) whose
// charge and discharge currents are set through a current mirror
// (M1/M2, M6/M7) by the transistor M3 driven by vctrl, followed by a plain
// inverter (M8/M9) that restores sharp edges. Two inversions make it
// non-inverting. The model keeps its ports (Din, Vctrl, Dout) and its
// function: every edge of din appears on dout after a delay that depends on
// vctrl. A higher vctrl means more current and a shorter delay.
//
// The delay of one element is half of the two-element curve
// clk_err_pkg::vcdl_delay_ps(); splitting it equally between the two
// cascaded elements is this model's assumption. The delay is sampled when an
// edge enters and applied as a transport delay, so pulses shorter than the
// delay are not swallowed (a real inverter pair would filter them).
//
// Timing: time unit 1 ps, precision 1 fs.
module vc_delay_element (
  input  logic din,
  input  real  vctrl,
  output logic dout
);
  timeunit 1ps; timeprecision 1fs;

  real delay_ps;
  always_comb delay_ps = clk_err_pkg::vcdl_delay_ps(vctrl) / real'(clk_err_pkg::NUM_STAGES_DEFAULT);

  initial dout = 1'b0;

  always @(din) begin
    automatic logic edge_val = din;
    automatic real  edge_dly = delay_ps;
    fork
      begin
        #(edge_dly) dout = edge_val;
      end
    join_none
  end

endmodule
