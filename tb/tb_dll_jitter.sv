`timescale 1ps/1fs
// Input-jitter test of the DLL at its default parameters.
//
// The DLL is locked, then CLK_IN edges are displaced at random, uniformly
// within a peak-to-peak range J around an ideal grid: J = 20 ps at 150 MHz
// and 500 MHz, 7.5 ps at 1.5 GHz. Over 3000 cycles the test checks that the
// loop holds its lock (no re-search, no Fail, coarse code unchanged) and
// measures the peak-to-peak position of CLK_OUT rising edges against the same
// grid. The models add no noise of their own. An output edge is an earlier
// input edge (jitter within J) plus the loop delay, and the loop delay wanders
// with the fine code: the detector compares two independently jittered edges,
// so it can only push the delay error back once it exceeds J, and the error
// stays within +/-(J + 1 LSB). Hence the hard bound: output pk-pk at most
// 3 J + 2 LSB (LSB = 2.1875 ps). The test also prints the output jitter less
// the input jitter, the part the loop adds.
module tb_dll_jitter;
  import dll_pkg::*;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  logic [Q_W-1:0] q;
  logic [C_W-1:0] c;
  sar_width_e width;
  logic stop, lock, reset_inc, vsar_cm, pi_en, fail;
  int checks = 0, failures = 0;

  dll_top dut (.*);

  realtime period = 6666.0;
  real     jit    = 0.0;     // peak-to-peak input jitter
  realtime t_grid = 0.0;     // ideal time of the current rising edge

  // Clock with edges at grid + uniform(-jit/2, +jit/2).
  initial begin
    forever begin
      real u1, u2;
      u1 = (real'($urandom_range(0, 1000)) / 1000.0 - 0.5) * jit;
      u2 = (real'($urandom_range(0, 1000)) / 1000.0 - 0.5) * jit;
      #(t_grid + u1 - $realtime) clk_in = 1'b1;
      #(t_grid + period / 2.0 + u2 - $realtime) clk_in = 1'b0;
      t_grid = t_grid + period;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (T=%0.0f q=%0d c=%0d)", what, period, q, c);
    end
  endtask

  // Output edge position against the ideal grid.
  bit  measuring = 1'b0;
  real e_min, e_max;
  always @(posedge clk_out) if (measuring) begin
    real e, ph;
    ph = $realtime - period * $floor($realtime / period);   // grid starts at 0
    e = (ph > period / 2.0) ? ph - period : ph;
    if (e < e_min) e_min = e;
    if (e > e_max) e_max = e;
  end

  int n_cm = 0;
  always @(posedge vsar_cm) n_cm++;

  real periods[3] = '{6666.0, 2000.0, 666.0};
  real jits[3]    = '{20.0, 20.0, 7.5};

  initial begin
    for (int i = 0; i < 3; i++) begin
      logic [Q_W-1:0] q_lock;
      int cm0;
      // Restart the grid at 0 for the new period.
      @(negedge clk_in);
      rst_n = 1'b0;
      jit = 0.0;
      period = periods[i];
      t_grid = period * $ceil($realtime / period) + period;
      #(10000.0) rst_n = 1'b1;
      repeat (2500) @(posedge clk_in);
      check(pi_en && !fail, "locked before jitter is applied");
      q_lock = q;
      cm0 = n_cm;
      jit = jits[i];
      repeat (100) @(posedge clk_in);
      e_min = 1.0e9; e_max = -1.0e9;
      measuring = 1'b1;
      repeat (3000) @(posedge clk_in);
      measuring = 1'b0;
      $display("T=%0.0f ps, input jitter %0.1f ps pk-pk: output %0.2f ps pk-pk (%0.2f .. %0.2f), added %0.2f ps",
               period, jit, e_max - e_min, e_min, e_max, e_max - e_min - jit);
      check(pi_en && !fail && n_cm == cm0 && q == q_lock, "lock held under input jitter");
      check(e_max - e_min <= 3.0 * jit + 2.0 * 2.1875 + 0.5, "output jitter within 3 J + 2 LSB");
      check(e_max - e_min >= 0.5 * jit, "input jitter reaches the output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(300_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
