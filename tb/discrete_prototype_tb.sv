// Workload testbench: the low-frequency prototype measurement.
//
// The digital part of the meter (pattern_gen and processing_unit, 8-bit
// counters, 255-cycle windows) runs at 500 kHz. The prototype's board-level
// delay line is replaced here by an ideal transport delay td between the
// pattern and the receiver, swept from 0 to 2 us in 20 ns steps, i.e. over a
// full clock period: a single positive delay then acts as the effective
// delay D = ((T/2 + td) mod T) - T/2, which covers negative values too.
// clk2 edge j comes skew + n(j) after clk1 edge j, n(j) a Gaussian of
// standard deviation 40 ns truncated to +/-100 ns. Two runs: skew 0 and
// skew -40 ns.
//
// Checks: every measured window against an independent count (the bit
// captured at clk2 edge j is the pattern value launched at the last clk1
// edge k whose delayed copy arrived before edge j; a flag is two equal
// successive captured bits); error-free windows when |D| is far outside the
// error range; the error-rate peak within 45 ns of the median clock error;
// the lower and upper ends of the non-zero error-rate range within 30 ns of
// skew -/+ 100 ns.
module discrete_prototype_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int  N_BITS = 8;
  localparam int  WIN    = (1 << N_BITS) - 1;
  localparam real T      = 2_000_000.0;    // 500 kHz, in ps
  localparam real T0     = 3.0 * T;
  localparam real SIGMA  = 40_000.0;
  localparam real NMAX   = 100_000.0;
  localparam real TD_STEP = 20_000.0;
  localparam int  NSTEP  = 101;             // 0 .. 2 us
  localparam int  MEAS_WIN = 2;
  localparam int  NRUN   = 2;
  localparam real SKEW [NRUN] = '{0.0, -40_000.0};
  localparam int  MAXCYC = 4 + NSTEP * (MEAS_WIN + 1) * WIN + 2 * WIN;

  int checks = 0, failures = 0;
  logic clk1 = 1'b0, clk2 = 1'b0, rst_n = 1'b1, q1, d2 = 1'b0;
  logic [N_BITS-1:0] nerr;
  logic nerr_update;

  pattern_gen u_tpg (.clk1(clk1), .rst_n(rst_n), .q1(q1));
  processing_unit u_pu (.clk2(clk2), .rst_n(rst_n), .d2(d2), .nerr(nerr), .nerr_update(nerr_update));

  real e_err [MAXCYC];
  real td = 0.0;
  real skew_now = 0.0;
  int  raw_idx = -1;
  int  run = 0;
  bit  running = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic real draw_error(input real skew);
    real z;
    do begin
      z = -6.0;
      for (int k = 0; k < 12; k++) z += real'($urandom) / 4294967296.0;
      z = SIGMA * z;
    end while (z < -NMAX || z > NMAX);
    return skew + z;
  endfunction

  // captured bit at clk2 edge j: q1 after clk1 edge k is (k+1) % 2
  function automatic int captured(input int j, input real d);
    int k;
    k = int'($floor((real'(j) * T + e_err[j] - d) / T));
    return (k + 1) % 2;
  endfunction

  function automatic int ref_window(input int E, input real d);
    int n = 0;
    for (int k = E - WIN; k <= E - 1; k++)
      if (captured(k - 1, d) == captured(k - 2, d)) n++;
    return n;
  endfunction

  // ideal transport delay standing in for the board delay line
  always @(q1) begin
    automatic logic v = q1;
    automatic real  dd = td;
    fork
      begin
        #(dd) d2 = v;
      end
    join_none
  end

  initial begin : watchdog
    #(real'(NRUN) * (T0 + real'(MAXCYC + 20) * T));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_run(input real skew);
    int  step, win_in_step, E;
    int  err_sum [NSTEP];
    int  zero_far, n_err_win;
    int  peak, lo, hi;
    real dlt [NSTEP];
    real er [NSTEP];
    real sorted [$];
    real med, start;

    // reset, then free-running clocks from time 'start'
    rst_n = 1'b0;
    td = 0.0;
    d2 = 1'b0;
    #(T);
    start = $realtime + T;
    rst_n = 1'b1;
    for (int i = 0; i < MAXCYC; i++) e_err[i] = draw_error(skew);
    foreach (err_sum[s]) err_sum[s] = 0;
    zero_far = 0;
    n_err_win = 0;
    running = 1;
    fork
      for (int i = 0; i < MAXCYC; i++) begin
        #(start + real'(i) * T - $realtime) clk1 = 1'b1;
        #(T / 2) clk1 = 1'b0;
      end
      for (int i = 0; i < MAXCYC; i++) begin
        #(start + real'(i) * T + e_err[i] - $realtime);
        raw_idx = i;
        clk2 = 1'b1;
        #(T / 2) clk2 = 1'b0;
      end
      begin
        step = 0;
        win_in_step = -1;   // the first window after reset is not used
        while (step < NSTEP) begin
          @(posedge clk2);
          if (nerr_update) begin
            E = raw_idx;
            #(T / 4);
            if (win_in_step >= 1) begin
              automatic int expn = ref_window(E, td);
              chk(int'(nerr) == expn, $sformatf("skew %0.0f ns, td=%0.0f ns: nerr=%0d expected %0d",
                                                skew / 1000.0, td / 1000.0, nerr, expn));
              err_sum[step] += int'(nerr);
              if (nerr != 0) n_err_win++;
            end
            win_in_step++;
            if (win_in_step == MEAS_WIN + 1) begin
              step++;
              win_in_step = 0;
              if (step < NSTEP) td = real'(step) * TD_STEP;
            end
          end
        end
      end
    join_any
    disable fork;
    running = 0;
    clk1 = 1'b0;
    clk2 = 1'b0;

    // analysis
    for (int s = 0; s < NSTEP; s++) begin
      real d;
      d = real'(s) * TD_STEP;
      // effective delay of a single delay of value d
      dlt[s] = (T / 2.0 + d) - T * $floor((T / 2.0 + d) / T) - T / 2.0;
      er[s] = real'(err_sum[s]) / real'(MEAS_WIN * WIN);
      if (dlt[s] > skew + NMAX + TD_STEP || dlt[s] < skew - NMAX - TD_STEP) begin
        chk(err_sum[s] == 0, $sformatf("errors at D=%0.0f ns, outside the error range", dlt[s] / 1000.0));
        if (err_sum[s] == 0) zero_far++;
      end
    end
    peak = 0;
    for (int s = 0; s < NSTEP; s++) if (er[s] > er[peak]) peak = s;
    lo = -1;
    hi = -1;
    for (int s = 0; s < NSTEP; s++) if (er[s] > 0.0) begin
      if (lo < 0 || dlt[s] < dlt[lo]) lo = s;
      if (hi < 0 || dlt[s] > dlt[hi]) hi = s;
    end
    for (int i = 0; i < MAXCYC; i++) sorted.push_back(e_err[i]);
    sorted.sort();
    med = sorted[sorted.size() / 2];
    $display("  skew %0.0f ns: ER peak %0.3f at td=%0.0f ns (D=%0.0f ns), median error %0.1f ns; ER>0 for D in [%0.0f, %0.0f] ns",
             skew / 1000.0, er[peak], real'(peak) * TD_STEP / 1000.0, dlt[peak] / 1000.0, med / 1000.0,
             dlt[lo] / 1000.0, dlt[hi] / 1000.0);
    chk(dlt[peak] > med - 45_000.0 && dlt[peak] < med + 45_000.0, "ER peak not at the skew");
    chk(er[peak] > 0.4, "ER peak below 0.4");
    chk(lo >= 0 && dlt[lo] > skew - NMAX - 30_000.0 && dlt[lo] < skew - NMAX + 30_000.0, "lower end of the error range");
    chk(hi >= 0 && dlt[hi] > skew + NMAX - 30_000.0 && dlt[hi] < skew + NMAX + 30_000.0, "upper end of the error range");
    chk(zero_far > 0, "no error-free setting far from the error range");
    chk(n_err_win > 0, "no window with errors");
  endtask

  initial begin
    #1;
    for (run = 0; run < NRUN; run++) one_run(SKEW[run]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
