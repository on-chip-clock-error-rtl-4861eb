// Reference values for the delay testbenches: the (control voltage, delay)
// pairs of one two-element variable delay as listed in the post-layout
// results of the 65 nm prototype, plus the two ends of the stated delay
// range (435.97 ps and 333.89 ps). Kept apart from the design's own table so
// that the testbenches check the models against independently typed numbers.
package vcdl_ref_pkg;
  localparam int NREF = 16;
  localparam real REF_V  [NREF] = '{0.85, 0.86, 0.87, 0.875, 0.88, 0.885, 0.89, 0.90,
                                    0.91, 0.92, 0.93, 0.94, 0.945, 0.95, 0.955, 1.20};
  localparam real REF_PS [NREF] = '{435.97, 424.69, 415.36, 410.96, 406.86, 403.11, 399.67, 393.13,
                                    387.12, 381.67, 376.61, 372.11, 370.06, 368.13, 366.31, 333.89};
endpackage
