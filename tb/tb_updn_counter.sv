`timescale 1ps/1fs
// Self-checking test of the fine-loop up/down counter.
//
// Compares the counter against an integer reference model under random
// Up/Down and PI_EN, checks the preset 32 while PI_EN is low, one step per
// clock edge, saturation at 0 and 127 (no wrap) and the sat flag.
module tb_updn_counter;
  import dll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, up = 1'b0;
  logic [C_W-1:0] c;
  logic sat;
  int model = 32;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  updn_counter dut (.*);

  always #2000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (c=%0d model=%0d sat=%0d)", what, c, model, sat);
    end
  endtask

  task automatic step(input bit e, input bit u);
    bit exp_sat;
    @(negedge clk) begin en = e; up = u; end
    #1;
    exp_sat = e && ((u && model == 127) || (!u && model == 0));
    check(sat == exp_sat, "sat flag");
    if (exp_sat && u) n_sat_hi++;
    if (exp_sat && !u) n_sat_lo++;
    @(posedge clk);
    if (!e)      model = 32;
    else if (u)  model = (model == 127) ? 127 : model + 1;
    else         model = (model == 0) ? 0 : model - 1;
    #1 check(int'(c) == model, "count");
  endtask

  initial begin
    @(negedge clk) rst_n = 1'b0;
    #100 rst_n = 1'b1;
    check(c == 7'd32, "reset to 0100000");
    repeat (5) step(1'b0, 1'b1);
    check(c == 7'd32, "held at 32 while PI_EN is low");
    repeat (110) step(1'b1, 1'b1);       // run into the top
    check(c == 7'd127, "saturates at 127");
    repeat (140) step(1'b1, 1'b0);       // and the bottom
    check(c == 7'd0, "saturates at 0");
    for (int i = 0; i < 400; i++) step(($urandom_range(0, 15) != 0), $urandom_range(0, 1) == 1);
    check(n_sat_hi > 0 && n_sat_lo > 0, "both limits reached");
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
