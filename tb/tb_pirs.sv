`timescale 1ps/1fs
// Self-checking test of the range-selector model.
//
// For Q[1:0] = 0..3 (through the 2-to-3 decoder) measures the delay from
// DL_MID to DL_OUTA and from DL_OUTA to DL_OUTB. Expected: phases p0, p1, p2
// at 1, 2 and 3 td1 (td1 = 140 ps) for Q[1:0] = 0, 1, 2, code 3 equal to
// code 2, and DL_OUTB always td2 = 280 ps after DL_OUTA.
module tb_pirs;
  localparam real TD1 = 140.0;
  logic dl_mid = 1'b0;
  logic [1:0] code = '0;
  logic [2:0] k, kb;
  logic dl_outa, dl_outb;
  int checks = 0, failures = 0;

  therm_dec #(.IN_W(2), .OUT_N(3)) u_dec (.bin(code), .t(k), .tb(kb));
  pirs dut (.*);

  initial begin
    for (int n = 0; n < 4; n++) begin
      realtime t0, ta, tbb;
      real exp_a;
      code = 2'(n);
      exp_a = (n == 3 ? 3.0 : n + 1.0) * TD1;
      #5000;
      t0 = $realtime; dl_mid = 1'b1;
      @(posedge dl_outa); ta = $realtime;
      @(posedge dl_outb); tbb = $realtime;
      checks++;
      if (ta - t0 < exp_a - 0.01 || ta - t0 > exp_a + 0.01) begin
        failures++;
        $display("FAIL: Q[1:0]=%0d DL_OUTA delay %0.2f expected %0.2f", n, ta - t0, exp_a);
      end
      checks++;
      if (tbb - ta < 2.0 * TD1 - 0.01 || tbb - ta > 2.0 * TD1 + 0.01) begin
        failures++;
        $display("FAIL: Q[1:0]=%0d DL_OUTB - DL_OUTA = %0.2f", n, tbb - ta);
      end
      #5000 dl_mid = 1'b0;
      @(negedge dl_outb);
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
