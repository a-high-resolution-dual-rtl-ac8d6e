`timescale 1ps/1fs
// Self-checking test of the level-converter model: each rising and falling
// edge of a 250 MHz clock must come out 500 ps later, unchanged in width.
module tb_level_conv;
  localparam realtime T = 4000.0;
  logic in_i = 1'b0, out;
  int checks = 0, failures = 0;

  level_conv dut (.*);

  always #(T / 2.0) in_i = ~in_i;
  realtime t_in = 0.0;
  always @(posedge in_i or negedge in_i) t_in = $realtime;

  initial begin
    repeat (20) begin
      @(out);
      checks++;
      if ($realtime - t_in < 499.99 || $realtime - t_in > 500.01 || out !== in_i) begin
        failures++;
        $display("FAIL: edge after %0.2f ps", $realtime - t_in);
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
