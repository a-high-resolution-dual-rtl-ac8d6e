`timescale 1ps/1fs
// Self-checking test of the phase-interpolator model.
//
// Feeds a 250 MHz clock as DL_OUTA and the same clock 280 ps later as
// DL_OUTB, with bias currents I_A = 128 - C and I_B = C as the DAC gives
// them. For every C the output edge must sit C * 280 / 128 ps after DL_OUTA
// (2.1875 ps steps; 70 ps at the initial code 32).
module tb_phase_interp;
  localparam realtime T = 4000.0;
  localparam real     SPAN = 280.0;
  logic dl_outa = 1'b0, dl_outb = 1'b0;
  logic [7:0] i_a, i_b;
  logic pi_out;
  int checks = 0, failures = 0;

  phase_interp dut (.*);

  always #(T / 2.0) dl_outa = ~dl_outa;
  always @(posedge dl_outa or negedge dl_outa) begin
    automatic logic v = dl_outa;
    fork
      #(SPAN) dl_outb = v;
    join_none
  end

  realtime t_a = 0.0;
  always @(posedge dl_outa) t_a = $realtime;

  initial begin
    for (int c = 0; c < 128; c++) begin
      realtime t_o;
      real exp;
      i_a = 8'(128 - c);
      i_b = 8'(c);
      repeat (2) @(posedge dl_outa);
      @(posedge pi_out); t_o = $realtime;
      exp = c * SPAN / 128.0;
      checks++;
      if (t_o - t_a < exp - 0.01 || t_o - t_a > exp + 0.01) begin
        failures++;
        $display("FAIL: C=%0d delay %0.3f expected %0.3f", c, t_o - t_a, exp);
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
