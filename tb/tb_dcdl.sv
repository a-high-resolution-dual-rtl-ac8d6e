`timescale 1ps/1fs
// Self-checking test of the delay-line model.
//
// For every setting n = 0..31 of the 5-to-32 thermometer code, sends single
// rising and falling edges into the line and measures when they reach
// dl_mid. Expected: (n + 1) * td2 with td2 = 280 ps, 32 distinct settings in
// 280 ps steps.
module tb_dcdl;
  localparam real TD2 = 280.0;
  logic clk_in = 1'b0;
  logic [31:0] t, tb;
  logic dl_mid;
  int checks = 0, failures = 0;

  therm_dec #(.IN_W(5), .OUT_N(32)) u_dec (.bin(code), .t(t), .tb(tb));
  logic [4:0] code = '0;
  dcdl dut (.clk_in(clk_in), .t(t), .tb(tb), .dl_mid(dl_mid));

  initial begin
    for (int n = 0; n < 32; n++) begin
      realtime t0, d_r, d_f;
      code = 5'(n);
      #20000;
      t0 = $realtime; clk_in = 1'b1;
      @(posedge dl_mid); d_r = $realtime - t0;
      #5000;
      t0 = $realtime; clk_in = 1'b0;
      @(negedge dl_mid); d_f = $realtime - t0;
      checks++;
      if (d_r < (n + 1) * TD2 - 0.01 || d_r > (n + 1) * TD2 + 0.01 ||
          d_f < (n + 1) * TD2 - 0.01 || d_f > (n + 1) * TD2 + 0.01) begin
        failures++;
        $display("FAIL: n=%0d delay %0.2f / %0.2f ps, expected %0.2f", n, d_r, d_f, (n + 1) * TD2);
      end
    end
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
