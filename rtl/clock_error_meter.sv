// Clock-error meter, simulation top level (contains behavioural models of
// the analog delays): on-chip measurement of the clock error between two
// clock domains, as in the integrated prototype.
//
// pattern_gen sends ...1010... in the clk1 domain. The pattern passes a
// variable delay td1 (control vctrl1); clk2 passes a second variable delay
// td2 (control vctrl2) before clocking the processing unit. The effective
// delay between the domains is D = td1 - td2, and it shifts the clock
// error seen by the receiver. Whenever the sign of (clock error - D) changes
// from one cycle to the next, the receiver gets two equal bits in a row and
// the processing unit counts an error. err is the number of errors in each
// window of 2**N_BITS-1 cycles of the delayed clk2. Sweeping D and
// recording the error rate ER(D) = err / (2**N_BITS-1) gives the skew (where
// ER peaks, near 1/2) and the minimum and maximum clock error (the edges of
// the range where ER is non-zero). td1_meas and td2_meas are replica ring
// oscillators of the two delays, of period 2*td1 and 2*td2, from which the
// delay values are read.
//
// The structure follows the published prototype. The reset, the osc_en
// enable of the oscillators and the err_update strobe are this design's own.
// err and err_update belong to the delayed clk2 domain.
//
// The delays and oscillators are behavioural models, so this top level is
// for simulation; the digital part (pattern_gen, processing_unit) is
// synthesizable on its own.
module clock_error_meter #(
  parameter int unsigned N_BITS     = clk_err_pkg::N_BITS_DEFAULT,
  parameter int unsigned NUM_STAGES = clk_err_pkg::NUM_STAGES_DEFAULT
) (
  input  logic              clk1,
  input  logic              clk2,
  input  logic              rst_n,
  input  real               vctrl1,
  input  real               vctrl2,
  input  logic              osc_en,
  output logic [N_BITS-1:0] err,
  output logic              err_update,
  output logic              td1_meas,
  output logic              td2_meas
);
  timeunit 1ps; timeprecision 1fs;

  logic q1;       // sent pattern (clk1 domain)
  logic d2;       // pattern after td1
  logic clk2_d;   // clk2 after td2

  pattern_gen u_tpg (
    .clk1  (clk1),
    .rst_n (rst_n),
    .q1    (q1)
  );

  variable_delay #(.NUM_STAGES(NUM_STAGES)) u_td1 (
    .din   (q1),
    .vctrl (vctrl1),
    .dout  (d2)
  );

  variable_delay #(.NUM_STAGES(NUM_STAGES)) u_td2 (
    .din   (clk2),
    .vctrl (vctrl2),
    .dout  (clk2_d)
  );

  processing_unit #(.N_BITS(N_BITS)) u_pu (
    .clk2        (clk2_d),
    .rst_n       (rst_n),
    .d2          (d2),
    .nerr        (err),
    .nerr_update (err_update)
  );

  delay_replica_osc #(.NUM_STAGES(NUM_STAGES)) u_td1_osc (
    .vctrl (vctrl1),
    .en    (osc_en),
    .osc   (td1_meas)
  );

  delay_replica_osc #(.NUM_STAGES(NUM_STAGES)) u_td2_osc (
    .vctrl (vctrl2),
    .en    (osc_en),
    .osc   (td2_meas)
  );

endmodule
