`timescale 1ps/1fs
// Self-checking test of the clock dividers: CLK_IN / 4 (SCLK) and SCLK / 2
// (counter clock), chained as in the DLL. Checks the period and duty cycle of
// each divided clock from its edge times, and that the first SCLK rising
// edge comes on the second CLK_IN rising edge after reset.
module tb_clk_div;
  localparam realtime T = 4000.0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic sclk, cclk;
  int checks = 0, failures = 0;

  clk_div #(.DIV_LOG2(2)) dut4 (.clk_i(clk),  .rst_n(rst_n), .clk_o(sclk));
  clk_div #(.DIV_LOG2(1)) dut2 (.clk_i(sclk), .rst_n(rst_n), .clk_o(cclk));

  always #(T / 2.0) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $realtime);
    end
  endtask

  realtime s_rise = 0.0, s_fall = 0.0, c_rise = 0.0, c_fall = 0.0;
  int n_s = 0, n_c = 0, n_clk = 0;
  bit running = 1'b0;

  always @(posedge clk) if (running) n_clk++;
  always @(posedge sclk) begin
    if (running) begin
      if (n_s == 0) check(n_clk == 2, "first SCLK edge on the 2nd CLK_IN edge");
      if (n_s > 0) check($realtime - s_rise == 4.0 * T, "SCLK period = 4 CLK_IN periods");
      n_s++;
    end
    s_rise = $realtime;
  end
  always @(negedge sclk) begin
    if (running && n_s > 0) check($realtime - s_rise == 2.0 * T, "SCLK duty cycle 50 %");
    s_fall = $realtime;
  end
  always @(posedge cclk) begin
    if (running && n_c > 0) check($realtime - c_rise == 8.0 * T, "counter clock = SCLK / 2");
    if (running) n_c++;
    c_rise = $realtime;
  end
  always @(negedge cclk) begin
    if (running && n_c > 0) check($realtime - c_rise == 4.0 * T, "counter clock duty cycle 50 %");
    c_fall = $realtime;
  end

  initial begin
    @(negedge clk) rst_n = 1'b0;
    #100 begin rst_n = 1'b1; running = 1'b1; end
    check(!sclk && !cclk, "outputs low after reset");
    repeat (200) @(posedge clk);
    check(n_s == 50 && n_c == 25, "edge counts over 200 input cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
