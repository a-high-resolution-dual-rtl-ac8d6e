`timescale 1ps/1fs
// Operating-frequency test of the DLL at its default parameters.
//
// Locks the DLL from reset at 150 MHz, 250 MHz, 500 MHz and 1.5 GHz. For
// each, checks that PI_EN is up, that Fail is low, that CLK_OUT rises within
// 6 ps of CLK_IN, and that the loop delay worked out from the final codes
// (independently of the design's models: (n + 1) * td2 through the delay line,
// (k + 1) * td1 through the range selector with k = min(Q[1:0], 2),
// C * td2 / 128 in the interpolator, plus the 500 ps level converter) is a
// whole number of periods: one period where the period exceeds the fixed
// delays of the path (920 ps), two at 1.5 GHz. Also prints the lock time.
module tb_dll_freq;
  import dll_pkg::*;

  logic clk_in = 1'b0, rst_n = 1'b1, clk_out;
  logic [Q_W-1:0] q;
  logic [C_W-1:0] c;
  sar_width_e width;
  logic stop, lock, reset_inc, vsar_cm, pi_en, fail;
  int checks = 0, failures = 0;

  dll_top dut (.*);

  realtime period = 6666.0;
  always #(period / 2.0) clk_in = ~clk_in;

  realtime t_in = 0.0;
  real     err  = 1.0e9;
  always @(posedge clk_in) t_in = $realtime;
  always @(posedge clk_out) begin
    real e;
    e = $realtime - t_in;
    if (e > period / 2.0) e = e - period;
    err = e;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (T=%0.0f q=%0d c=%0d)", what, period, q, c);
    end
  endtask

  localparam real TD2 = 280.0, TD1 = 140.0, CONV = 500.0;
  real periods[4]   = '{6666.0, 4000.0, 2000.0, 666.0};
  int  multiples[4] = '{1, 1, 1, 2};

  initial begin
    for (int i = 0; i < 4; i++) begin
      int n, k, ci, cycles;
      real d;
      period = periods[i];
      #(20000.0) rst_n = 1'b0;
      #(20000.0) rst_n = 1'b1;
      cycles = 0;
      while (!pi_en && !fail && cycles < 2000) begin
        @(posedge clk_in);
        cycles++;
      end
      repeat (2000) @(posedge clk_in);
      n = int'(q[6:2]);
      k = int'(q[1:0]);
      if (k == 3) k = 2;
      ci = int'(c);
      d = real'(n + 1) * TD2 + real'(k + 1) * TD1 + real'(ci) * TD2 / 128.0 + CONV;
      $display("T=%0.0f ps: coarse lock after %0d CLK_IN cycles, width %0d bits, Q=%0d C=%0d, delay %0.1f ps = %0.2f T, error %0.2f ps",
               period, cycles, width_bits(width), q, c, d, d / period, err);
      check(pi_en && !fail, "locked");
      check(err < 6.0 && err > -6.0, "CLK_OUT aligned with CLK_IN");
      check(d > (multiples[i] - 0.01) * period && d < (multiples[i] + 0.01) * period,
            $sformatf("loop delay is %0d period(s)", multiples[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(200_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
