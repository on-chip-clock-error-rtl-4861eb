// End-to-end testbench of clock_error_meter at its default size (8-bit
// counters, two-element delays).
//
// Stimulus: two 1 GHz clocks. clk2 edge i comes e(i) after clk1 edge i,
// with e(i) drawn independently per cycle from a Gaussian of mean -20 ps and
// standard deviation 10 ps, truncated to [-53.4 ps, 19.6 ps] (the skew and
// extremes of the clock error used for the published post-layout run).
// The control voltages step through the 16 published settings, giving
// effective delays D = td1 - td2 from -54.63 ps to +20.81 ps. At each
// setting the first window is discarded (the voltage changed inside it) and
// the next four windows of 255 cycles are measured.
//
// Checks:
//  * every measured window: err equals the number of sign changes of
//    (e - D) counted independently from the generated errors, with the
//    processing unit's two-cycle latency (flag at edge k compares the bits
//    of edges k-1 and k-2);
//  * Rs loads every 255 cycles of clk2;
//  * the replica oscillators run with period 2*td1 and 2*td2;
//  * the error rate of each setting agrees with ER = 2a(1-a), where a is the
//    measured fraction of cycles with e < D;
//  * the error-rate peak lies within 6 ps of the median clock error (skew);
//  * the mechanisms all occur: error-free windows on both sides of the
//    error range, windows with errors, negative and positive D, oscillator
//    readings.
module clock_error_meter_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int    N_BITS = 8;
  localparam int    WIN    = (1 << N_BITS) - 1;
  localparam real   T      = 1000.0;       // 1 GHz
  localparam real   T0     = 3000.0;       // first clock edge
  localparam real   MU     = -20.0;
  localparam real   SIGMA  = 10.0;
  localparam real   EMIN   = -53.4;
  localparam real   EMAX   = 19.6;
  localparam int    NSTEP  = 16;
  localparam int    MEAS_WIN = 4;
  localparam int    MAXCYC = 2 + (NSTEP + 1) * (MEAS_WIN + 2) * WIN;

  // Settings of the sweep: control voltages, the resulting delays of the
  // two variable delays (ps) and the effective delay D = td1 - td2 (ps).
  localparam real V1  [NSTEP] = '{0.945, 0.955, 0.955, 0.955, 0.95, 0.95, 0.95, 0.95,
                                  0.94, 0.93, 0.92, 0.91, 0.91, 0.91, 0.91, 0.91};
  localparam real V2  [NSTEP] = '{0.86, 0.87, 0.875, 0.88, 0.885, 0.89, 0.9, 0.91,
                                  0.91, 0.91, 0.91, 0.91, 0.92, 0.93, 0.94, 0.955};
  localparam real TD1 [NSTEP] = '{370.06, 366.31, 366.31, 366.31, 368.13, 368.13, 368.13, 368.13,
                                  372.11, 376.61, 381.67, 387.12, 387.12, 387.12, 387.12, 387.12};
  localparam real TD2 [NSTEP] = '{424.69, 415.36, 410.96, 406.86, 403.11, 399.67, 393.13, 387.12,
                                  387.12, 387.12, 387.12, 387.12, 381.67, 376.61, 372.11, 366.31};
  localparam real DLT [NSTEP] = '{-54.63, -49.05, -44.65, -40.55, -34.98, -31.54, -25.0, -18.99,
                                  -15.01, -10.51, -5.45, 0.0, 5.45, 10.51, 15.01, 20.81};

  int checks = 0, failures = 0;

  logic clk1 = 1'b0, clk2 = 1'b0, rst_n = 1'b1, osc_en = 1'b0;
  real  vctrl1 = V1[0], vctrl2 = V2[0];
  logic [N_BITS-1:0] err;
  logic err_update, td1_meas, td2_meas;

  clock_error_meter dut (
    .clk1(clk1), .clk2(clk2), .rst_n(rst_n), .vctrl1(vctrl1), .vctrl2(vctrl2),
    .osc_en(osc_en), .err(err), .err_update(err_update),
    .td1_meas(td1_meas), .td2_meas(td2_meas));

  real e_err [MAXCYC];
  int  raw_idx = -1;

  // mechanism counters
  int n_windows = 0, n_zero_low = 0, n_zero_high = 0, n_with_err = 0;
  int n_neg_d = 0, n_pos_d = 0, n_osc = 0, n_period_ok = 0;

  // per-setting results
  int  step = 0, win_in_step = 0, last_e = -1;
  int  step_err [NSTEP];
  int  step_below [NSTEP];
  int  step_cycles [NSTEP];
  real step_er [NSTEP];
  bit  done = 0;
  event step_changed;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic real gauss();
    real z;
    z = -6.0;
    for (int k = 0; k < 12; k++) z += real'($urandom) / 4294967296.0;
    return z;
  endfunction

  function automatic real draw_error();
    real e;
    do e = MU + SIGMA * gauss(); while (e < EMIN || e > EMAX);
    return e;
  endfunction

  // reference: flags counted in the window that Rs loads at edge E
  function automatic int ref_window(input int E, input real d);
    int n = 0;
    for (int k = E - WIN; k <= E - 1; k++)
      if ((e_err[k-1] > d) != (e_err[k-2] > d)) n++;
    return n;
  endfunction

  // clocks
  initial begin
    #(T0);
    forever begin
      clk1 = 1'b1;
      #(T / 2) clk1 = 1'b0;
      #(T / 2);
    end
  end

  initial begin
    for (int i = 0; i < MAXCYC; i++) begin
      e_err[i] = draw_error();
      #(T0 + real'(i) * T + e_err[i] - $realtime);
      raw_idx = i;
      clk2 = 1'b1;
      #(T / 2) clk2 = 1'b0;
    end
  end

  // reset and oscillator enable
  initial begin
    #1 rst_n = 1'b0;
    #(T0 + 5.0 * T) rst_n = 1'b1;
    osc_en = 1'b1;
  end

  initial begin : watchdog
    #(T0 + real'(MAXCYC + 10) * T);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window monitor: err_update seen at raw clk2 edge E means Rs loads at the
  // delayed edge E; err is read 700 ps later, between delayed edges E, E+1
  always @(posedge clk2) begin
    if (err_update && rst_n && !done) begin
      automatic int E = raw_idx;
      #700;
      n_windows++;
      if (last_e >= 0) chk(E - last_e == WIN, $sformatf("window length %0d", E - last_e));
      last_e = E;
      if (win_in_step >= 1 && step < NSTEP) begin
        automatic int expn = ref_window(E, DLT[step]);
        chk(int'(err) == expn, $sformatf("D=%0.2f window %0d: err=%0d expected %0d",
                                         DLT[step], win_in_step, err, expn));
        step_err[step] += int'(err);
        step_cycles[step] += WIN;
        for (int k = E - WIN; k <= E - 1; k++) if (e_err[k-1] < DLT[step]) step_below[step]++;
        if (err == '0 && DLT[step] < EMIN) n_zero_low++;
        if (err == '0 && DLT[step] > EMAX) n_zero_high++;
        if (err != '0) n_with_err++;
        if (DLT[step] < 0.0) n_neg_d++;
        if (DLT[step] > 0.0) n_pos_d++;
      end
      win_in_step++;
      if (win_in_step == MEAS_WIN + 1) begin
        step++;
        win_in_step = 0;
        if (step < NSTEP) begin
          vctrl1 = V1[step];
          vctrl2 = V2[step];
          -> step_changed;
        end else begin
          done = 1;
        end
      end
    end
  end

  // oscillator readout: after each voltage change, 3 periods of each ring
  task automatic read_osc(input int s);
    realtime t0, t1, u0, u1;
    fork
      begin
        @(posedge td1_meas) t0 = $realtime;
        repeat (3) @(posedge td1_meas);
        t1 = $realtime;
      end
      begin
        @(posedge td2_meas) u0 = $realtime;
        repeat (3) @(posedge td2_meas);
        u1 = $realtime;
      end
    join
    n_osc++;
    if ((t1 - t0) / 6.0 > TD1[s] - 0.01 && (t1 - t0) / 6.0 < TD1[s] + 0.01 &&
        (u1 - u0) / 6.0 > TD2[s] - 0.01 && (u1 - u0) / 6.0 < TD2[s] + 0.01)
      n_period_ok++;
    chk((t1 - t0) / 6.0 > TD1[s] - 0.01 && (t1 - t0) / 6.0 < TD1[s] + 0.01,
        $sformatf("td1 from oscillator %0.3f ps, expected %0.2f", (t1 - t0) / 6.0, TD1[s]));
    chk((u1 - u0) / 6.0 > TD2[s] - 0.01 && (u1 - u0) / 6.0 < TD2[s] + 0.01,
        $sformatf("td2 from oscillator %0.3f ps, expected %0.2f", (u1 - u0) / 6.0, TD2[s]));
  endtask

  initial begin
    wait (osc_en);
    #(5.0 * T);
    read_osc(0);
    forever begin
      @(step_changed);
      #(5.0 * T);
      read_osc(step);
    end
  end

  // analysis
  initial begin
    int peak;
    real a, er_th, med;
    real sorted [$];
    foreach (step_err[s]) begin
      step_err[s] = 0;
      step_below[s] = 0;
      step_cycles[s] = 0;
    end
    wait (done);
    #(10.0 * T);
    $display("   D (ps)   td1 (ps)  td2 (ps)  errors  ER      2a(1-a)");
    peak = 0;
    for (int s = 0; s < NSTEP; s++) begin
      step_er[s] = real'(step_err[s]) / real'(step_cycles[s]);
      a = real'(step_below[s]) / real'(step_cycles[s]);
      er_th = 2.0 * a * (1.0 - a);
      $display("  %7.2f   %7.2f   %7.2f   %4d    %6.4f  %6.4f",
               DLT[s], TD1[s], TD2[s], step_err[s], step_er[s], er_th);
      chk(step_cycles[s] == MEAS_WIN * WIN, $sformatf("setting %0d measured %0d cycles", s, step_cycles[s]));
      chk(step_er[s] > er_th - 0.06 && step_er[s] < er_th + 0.06,
          $sformatf("D=%0.2f: ER %0.4f far from 2a(1-a)=%0.4f", DLT[s], step_er[s], er_th));
      if (step_er[s] > step_er[peak]) peak = s;
    end
    // skew: median of the generated clock errors
    for (int i = 0; i <= last_e; i++) sorted.push_back(e_err[i]);
    sorted.sort();
    med = sorted[sorted.size() / 2];
    $display("  ER peak %0.4f at D=%0.2f ps; median clock error %0.2f ps; min %0.2f max %0.2f",
             step_er[peak], DLT[peak], med, sorted[0], sorted[sorted.size() - 1]);
    chk(DLT[peak] > med - 6.0 && DLT[peak] < med + 6.0, "ER peak not at the skew");
    chk(step_er[peak] > 0.4, "ER peak below 0.4");
    $display("  mechanisms: windows=%0d zero_low=%0d zero_high=%0d with_errors=%0d neg_D=%0d pos_D=%0d osc_reads=%0d osc_ok=%0d",
             n_windows, n_zero_low, n_zero_high, n_with_err, n_neg_d, n_pos_d, n_osc, n_period_ok);
    chk(n_zero_low  > 0, "no error-free window below the error range");
    chk(n_zero_high > 0, "no error-free window above the error range");
    chk(n_with_err  > 0, "no window with errors");
    chk(n_neg_d > 0 && n_pos_d > 0, "negative and positive delays not both used");
    chk(n_osc == NSTEP && n_period_ok == NSTEP, "oscillator readings");
    chk(n_windows >= NSTEP * (MEAS_WIN + 1), "too few windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
