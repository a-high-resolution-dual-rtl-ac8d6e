`timescale 1ps/1fs
// Self-checking test of the DAC model over all 128 codes: I_DAC_B = C and
// I_DAC_A = 128 - C (in LSB currents), so their sum is constant.
module tb_dac;
  logic [6:0] c;
  logic [7:0] i_dac_a, i_dac_b;
  int checks = 0, failures = 0;

  dac dut (.*);

  initial begin
    for (int v = 0; v < 128; v++) begin
      c = 7'(v);
      #10;
      checks++;
      if (int'(i_dac_b) != v || int'(i_dac_a) != 128 - v) begin
        failures++;
        $display("FAIL: C=%0d gives A=%0d B=%0d", v, i_dac_a, i_dac_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
