// Shared constants of the clock-error measurement circuit.
//
// N_BITS_DEFAULT is the width of the error counter C1, the window counter C2
// and the output register Rs; the 8 bits are those of the integrated and of
// the discrete prototype. A measurement window is 2**N_BITS-1 cycles of clk2.
//
// vcdl_delay_ps() is the transfer curve of one variable delay (two cascaded
// voltage-controlled delay elements): delay in ps as a function of the
// control voltage in V. The breakpoints below are the post-layout pairs
// (Vctrl, delay) reported for the 65 nm prototype between 0.86 V and
// 0.955 V, extended by the two ends of the stated delay range, 435.97 ps at
// 0.85 V and 333.89 ps at 1.2 V. Between breakpoints the curve is linear;
// outside 0.85 V .. 1.2 V it is held at the end value. The choice of the
// end-point voltages and of linear interpolation is this model's own.
package clk_err_pkg;

  localparam int unsigned N_BITS_DEFAULT     = 8;
  localparam int unsigned NUM_STAGES_DEFAULT = 2;

  localparam int unsigned VCDL_POINTS = 16;

  typedef struct packed {
    int unsigned mv;  // control voltage, mV
    int unsigned fs;  // delay of the variable delay, fs
  } vcdl_point_t;

  localparam vcdl_point_t VCDL_CURVE [VCDL_POINTS] = '{
    '{ 850, 435970}, '{ 860, 424690}, '{ 870, 415360}, '{ 875, 410960},
    '{ 880, 406860}, '{ 885, 403110}, '{ 890, 399670}, '{ 900, 393130},
    '{ 910, 387120}, '{ 920, 381670}, '{ 930, 376610}, '{ 940, 372110},
    '{ 945, 370060}, '{ 950, 368130}, '{ 955, 366310}, '{1200, 333890}
  };

  // Delay of one variable delay (NUM_STAGES_DEFAULT elements) in ps.
  function automatic real vcdl_delay_ps(real vctrl);
    real mv;
    real m0, m1, d0, d1;
    mv = vctrl * 1000.0;
    if (mv <= real'(VCDL_CURVE[0].mv)) return real'(VCDL_CURVE[0].fs) / 1000.0;
    for (int i = 1; i < VCDL_POINTS; i++) begin
      if (mv <= real'(VCDL_CURVE[i].mv)) begin
        m0 = real'(VCDL_CURVE[i-1].mv);
        m1 = real'(VCDL_CURVE[i].mv);
        d0 = real'(VCDL_CURVE[i-1].fs) / 1000.0;
        d1 = real'(VCDL_CURVE[i].fs) / 1000.0;
        return d0 + (d1 - d0) * (mv - m0) / (m1 - m0);
      end
    end
    return real'(VCDL_CURVE[VCDL_POINTS-1].fs) / 1000.0;
  endfunction

endpackage
