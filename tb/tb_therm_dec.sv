`timescale 1ps/1fs
// Self-checking test of the binary-to-thermometer decoders, both sizes used
// in the DLL (5-to-32 and 2-to-3), over all input values: output i must be
// high exactly when i is below the input value, and tb must be its complement.
module tb_therm_dec;
  logic [4:0]  bin32;
  logic [31:0] t32, tb32;
  logic [1:0]  bin3;
  logic [2:0]  t3, tb3;
  int checks = 0, failures = 0;

  therm_dec #(.IN_W(5), .OUT_N(32)) dut32 (.bin(bin32), .t(t32), .tb(tb32));
  therm_dec #(.IN_W(2), .OUT_N(3))  dut3  (.bin(bin3),  .t(t3),  .tb(tb3));

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [31:0] exp;
      bin32 = 5'(v);
      #10;
      exp = (32'd1 << v) - 32'd1;     // v ones from the bottom
      checks++;
      if (t32 !== exp || tb32 !== ~exp) begin
        failures++;
        $display("FAIL: 5-to-32 value %0d gave %h", v, t32);
      end
    end
    for (int v = 0; v < 4; v++) begin
      logic [2:0] exp;
      bin3 = 2'(v);
      #10;
      exp = (v == 0) ? 3'b000 : (v == 1) ? 3'b001 : (v == 2) ? 3'b011 : 3'b111;
      checks++;
      if (t3 !== exp || tb3 !== ~exp) begin
        failures++;
        $display("FAIL: 2-to-3 value %0d gave %b", v, t3);
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
