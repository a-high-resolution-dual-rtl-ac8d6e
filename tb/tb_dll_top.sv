`timescale 1ps/1fs
// End-to-end test of the dual-loop DLL at its default parameters.
//
// Drives CLK_IN at 250 MHz and checks that the DLL goes through the whole
// hybrid search: a 5-bit search that ends without lock, a Reset that widens
// the VSAR, a 6-bit search that locks, PI_EN, a fine sequential search that
// ends dithering by one LSB, and CLK_OUT rising within a few picoseconds of
// CLK_IN. It then changes the period to 4.4 ns, far beyond the fine range:
// the counter runs into its limit, the controller restarts the coarse search
// (VSAR_CM) and the DLL locks again. A second run at 150 MHz needs the 7-bit
// search, and at 40 MHz, below the range, the controller must end in Fail.
// The measured alignment is independent of the design: it is taken
// from the edge times of CLK_IN and CLK_OUT. Each mechanism is counted and
// must happen at least once.
module tb_dll_top;
  import dll_pkg::*;

  logic clk_in = 1'b0;
  logic rst_n  = 1'b1;
  logic clk_out;
  logic [Q_W-1:0] q;
  logic [C_W-1:0] c;
  sar_width_e width;
  logic stop, lock, reset_inc, vsar_cm, pi_en, fail;

  dll_top dut (.*);

  realtime period = 4000.0;
  int checks = 0, failures = 0;

  always begin
    #(period / 2.0) clk_in = ~clk_in;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t q=%0d c=%0d width=%0d)", what, $realtime, q, c, width);
    end
  endtask

  // Mechanism counters
  int n_reset = 0, n_restart = 0, n_pi_en = 0, n_up = 0, n_down = 0;
  int n_w6_lock = 0, n_w7_lock = 0, n_stop = 0;
  logic [C_W-1:0] c_prev;
  always @(posedge reset_inc) n_reset++;
  always @(posedge vsar_cm)   n_restart++;
  always @(posedge stop)      n_stop++;
  realtime t_rel = 0.0, t_pi_en = 0.0;
  always @(posedge pi_en) begin
    if (n_pi_en == 0) t_pi_en = $realtime;
    n_pi_en++;
    if (width == SW6) n_w6_lock++;
    if (width == SW7) n_w7_lock++;
  end
  always @(c) begin
    if (pi_en && c == c_prev + 7'd1) n_up++;
    if (pi_en && c == c_prev - 7'd1) n_down++;
    c_prev = c;
  end

  // Phase error of the last CLK_OUT rising edge against the nearest CLK_IN edge
  realtime t_in = 0.0;
  real     err  = 1.0e9;
  always @(posedge clk_in) t_in = $realtime;
  always @(posedge clk_out) begin
    real e;
    e = $realtime - t_in;                 // 0 .. period after the last ref edge
    if (e > period / 2.0) e = e - period; // negative: output early
    err = e;
  end

  // Wait for PI_EN and then for the counter to settle into its dither.
  task automatic wait_lock(input int max_cycles, output bit ok);
    int n;
    int lo, hi;
    ok = 1'b0;
    for (n = 0; n < max_cycles && !pi_en; n++) @(posedge clk_in);
    if (!pi_en) return;
    // Let the sequential search run, then watch the code for 64 counter steps.
    repeat (130 * 8) @(posedge clk_in);
    lo = 127; hi = 0;
    repeat (64 * 8) begin
      @(posedge clk_in);
      if (int'(c) < lo) lo = int'(c);
      if (int'(c) > hi) hi = int'(c);
    end
    ok = pi_en && (hi - lo <= 2);
    $display("lock: width=%0d q=%0d c=%0d..%0d err=%0.2f ps", width, q, lo, hi, err);
  endtask

  initial begin
    bit ok;
    c_prev = C_INIT;
    #(1000.0) rst_n = 1'b0;   // an edge on rst_n clears the asynchronous resets
    repeat (3) @(posedge clk_in);
    @(negedge clk_in) rst_n = 1'b1;
    t_rel = $realtime;

    // 1. 250 MHz: expect 5-bit failure, Reset, 6-bit lock.
    wait_lock(2000, ok);
    check(ok, "lock at 250 MHz");
    check(width == SW6, "250 MHz locks with the 6-bit search");
    check(!fail, "no fail at 250 MHz");
    check(err < 6.0 && err > -6.0, "CLK_OUT aligned to CLK_IN at 250 MHz");
    check(lock, "coarse lock held at 250 MHz");
    // Coarse lock latency. SCLK rises on the 2nd CLK_IN edge after reset and
    // every 4 cycles after. 5-bit search: 1 arm + 5 decision edges, 3 edges to
    // judge Lock, 1 edge for the Reset; 6-bit search: 1 + 6 edges, 3 to judge.
    // PI_EN therefore rises on SCLK edge 20: 0.5 + 1 + 19 * 4 = 77.5 periods.
    check(t_pi_en - t_rel > 77.5 * 4000.0 - 1.0 && t_pi_en - t_rel < 77.5 * 4000.0 + 1.0,
          $sformatf("PI_EN 77.5 CLK_IN periods after reset (got %0.2f)", (t_pi_en - t_rel) / 4000.0));

    // 2. Change the period beyond the fine range: re-lock through VSAR_CM.
    period = 4400.0;
    wait_lock_after_restart();
    check(err < 6.0 && err > -6.0, "CLK_OUT aligned after period change");

    // 3. 150 MHz from reset: needs the 7-bit search.
    rst_n = 1'b0;
    period = 6666.0;
    repeat (3) @(posedge clk_in);
    rst_n = 1'b1;
    wait_lock(4000, ok);
    check(ok, "lock at 150 MHz");
    check(width == SW7, "150 MHz locks with the 7-bit search");
    check(err < 6.0 && err > -6.0, "CLK_OUT aligned to CLK_IN at 150 MHz");

    // 4. 40 MHz is below the range: even the 7-bit search finds no lock.
    rst_n = 1'b0;
    period = 25000.0;
    repeat (3) @(posedge clk_in);
    rst_n = 1'b1;
    for (int n = 0; n < 400 && !fail; n++) @(posedge clk_in);
    check(fail, "Fail after the 7-bit search below the range");
    check(!pi_en, "fine loop stays off after Fail");
    check(n_reset >= 5, "two Resets before Fail");

    // Every mechanism must have happened.
    $display("reset=%0d restart=%0d stop=%0d pi_en=%0d up=%0d down=%0d w6=%0d w7=%0d",
             n_reset, n_restart, n_stop, n_pi_en, n_up, n_down, n_w6_lock, n_w7_lock);
    check(n_reset   >= 1, "VSAR Reset (search widened) happened");
    check(n_restart >= 1, "VSAR restart on lost lock happened");
    check(n_w6_lock >= 1, "6-bit search locked");
    check(n_w7_lock >= 1, "7-bit search locked");
    check(n_up      >= 1, "counter stepped up");
    check(n_down    >= 1, "counter stepped down");
    check(n_stop    >= 3, "binary searches completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_lock_after_restart();
    bit ok;
    int n;
    for (n = 0; n < 8000 && n_restart == 0; n++) @(posedge clk_in);
    check(n_restart > 0, "lost lock detected after period change");
    @(posedge clk_in);
    wait_lock(4000, ok);
    check(ok, "re-lock after period change");
  endtask

  // Watchdog
  initial begin
    #(200_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
