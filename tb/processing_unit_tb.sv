// Self-checking testbench of processing_unit at its default 8-bit size.
//
// The received stream b[k] is set before rising clk2 edge k. The flag
// counted at rising edge e is (b[e-1] == b[e-2]) (b[0] = b[-1] = 0 for the
// reset state). Rs loads at the edges E where C2 overflows, which must be
// E = 255*w (w = 1, 2, ...); the value must be the sum of the flags counted
// at edges E-255 .. E-1 (edges 1 .. 254 for the first window). Each window
// uses a different error probability, from a clean ...1010... stream (0
// errors) to a constant stream (255 errors).
module processing_unit_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int N_BITS = 8;
  localparam int WIN = (1 << N_BITS) - 1;
  localparam int NWIN = 8;
  localparam int NEDGES = NWIN * WIN + 2;
  localparam int T = 1000;

  int checks = 0, failures = 0;
  logic clk2 = 1'b0, rst_n = 1'b1, d2 = 1'b0;
  logic [N_BITS-1:0] nerr;
  logic nerr_update;
  logic b [-1:NEDGES];
  int   flag [1:NEDGES];
  int   prob [NWIN+1];
  int   updates = 0, last_update = 0, last_nerr = 0;
  bit   saw_zero = 0, saw_full = 0;

  processing_unit dut (.clk2(clk2), .rst_n(rst_n), .d2(d2), .nerr(nerr), .nerr_update(nerr_update));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // reset asserted with a falling edge so the asynchronous reset fires
  initial #1 rst_n = 1'b0;

  initial begin : watchdog
    #(T * (NEDGES + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // error probability (percent) of each window's stream
    prob = '{0, 100, 3, 50, 20, 0, 75, 10, 35};
    b[-1] = 1'b0;
    b[0]  = 1'b0;
    for (int k = 1; k <= NEDGES; k++) begin
      int w;
      w = (k + 1) / WIN;   // decision k feeds the flag counted at edge k+1
      if (w > NWIN) w = NWIN;
      b[k] = ($urandom_range(0, 99) < prob[w]) ? b[k-1] : ~b[k-1];
    end
    for (int e = 1; e <= NEDGES; e++)
      flag[e] = (e >= 2) ? int'(b[e-1] == b[e-2]) : 1;   // b[0] == b[-1]

    #(T) rst_n = 1'b1;
    #(T / 4);
    for (int k = 1; k <= NEDGES; k++) begin
      bit upd;
      d2 = b[k];
      upd = nerr_update;               // sampled before edge k
      #(T / 4) clk2 = 1'b1;
      #1;
      if (upd) begin
        int lo, expn;
        updates++;
        chk(k % WIN == 0, $sformatf("Rs loaded at edge %0d, not a multiple of %0d", k, WIN));
        if (updates > 1) chk(k - last_update == WIN, "window length");
        lo = (k == WIN) ? 1 : k - WIN;
        expn = 0;
        for (int e = lo; e <= k - 1; e++) expn += flag[e];
        chk(int'(nerr) == expn, $sformatf("window %0d: nerr=%0d expected %0d", updates, nerr, expn));
        if (expn == 0)   saw_zero = 1;
        if (expn == WIN) saw_full = 1;
        last_update = k;
        last_nerr = int'(nerr);
      end else begin
        chk(int'(nerr) == last_nerr, $sformatf("nerr changed outside a window end at edge %0d", k));
      end
      #(T / 2 - 1) clk2 = 1'b0;
      #(T / 4);
    end
    chk(updates == NWIN, $sformatf("%0d windows completed, expected %0d", updates, NWIN));
    chk(saw_zero, "no error-free window seen");
    chk(saw_full, "no all-error window seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
