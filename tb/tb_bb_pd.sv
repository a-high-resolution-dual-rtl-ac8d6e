`timescale 1ps/1fs
// Self-checking test of the bang-bang phase detector.
//
// Drives a 250 MHz reference and a copy of it delayed by a known amount D,
// sweeping D over two periods, and checks the decision against the timing:
// up = 1 exactly when the delayed edge comes within half a period before the
// next reference edge, i.e. D mod T in (T/2, T).
module tb_bb_pd;
  localparam realtime T = 4000.0;
  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b1;
  logic up;
  realtime d = 0.0;
  int checks = 0, failures = 0;

  bb_pd dut (.*);

  always #(T / 2.0) ref_clk = ~ref_clk;
  always @(posedge ref_clk or negedge ref_clk) begin
    automatic logic    v  = ref_clk;
    automatic realtime dd = d;
    fork
      #(dd) fb_clk = v;
    join_none
  end

  initial begin
    @(negedge ref_clk) rst_n = 1'b0;
    #100 rst_n = 1'b1;
    checks++;
    if (up !== 1'b0) begin failures++; $display("FAIL: reset"); end
    for (int i = 1; i < 80; i++) begin
      real m;
      bit exp;
      d = 100.0 * i + 13.0;          // stay away from the exact boundaries
      m = d - T * $floor(d / T);
      exp = (m > T / 2.0);
      repeat (4) @(posedge ref_clk);
      #1;
      checks++;
      if (up !== exp) begin
        failures++;
        $display("FAIL: delay %0.1f ps: up=%0d expected %0d", d, up, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
