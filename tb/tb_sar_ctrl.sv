`timescale 1ps/1fs
// Self-checking test of the SAR controller.
//
// Plays the VSAR's Stop and width and the phase detector's Lock by hand and
// checks the controller's answers and their cycle timing: no Lock after a 5-
// or 6-bit search gives a one-cycle Reset exactly SETTLE + 1 edges after
// Stop; Lock gives PI_EN at the same point; no Lock after a 7-bit search
// gives Fail and nothing else; a saturated fine counter in closed loop drops
// PI_EN and gives a one-cycle VSAR_CM; Lock arriving during the settle time
// counts.
module tb_sar_ctrl;
  import dll_pkg::*;

  localparam int unsigned SETTLE = 2;
  logic clk = 1'b0, rst_n = 1'b1;
  logic stop = 1'b0, lock = 1'b0, c_sat = 1'b0;
  sar_width_e width = SW5;
  logic reset_inc, vsar_cm, pi_en, fail;
  int checks = 0, failures = 0;

  sar_ctrl #(.SETTLE(SETTLE)) dut (.*);

  always #2000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (reset=%0d cm=%0d pi_en=%0d fail=%0d)", what, reset_inc, vsar_cm, pi_en, fail);
    end
  endtask

  // Raise Stop and count the edges until one of the outputs reacts.
  task automatic finish_search(input sar_width_e w, input bit lk, output int edges);
    edges = 0;
    @(negedge clk);
    width = w; lock = lk; stop = 1'b1;
    do begin
      @(posedge clk); #1;
      edges++;
    end while (!reset_inc && !pi_en && !fail && edges < 20);
  endtask

  initial begin
    int e;
    @(negedge clk) rst_n = 1'b0;
    #100 rst_n = 1'b1;
    check(!reset_inc && !vsar_cm && !pi_en && !fail, "reset state");

    // 5-bit search without lock -> Reset.
    finish_search(SW5, 1'b0, e);
    check(reset_inc && !pi_en && !fail, "no lock at 5 bits gives Reset");
    check(e == SETTLE + 1, $sformatf("Reset %0d edges after Stop (got %0d)", SETTLE + 1, e));
    @(negedge clk) stop = 1'b0;        // the VSAR clears Stop on Reset
    @(posedge clk); #1 check(!reset_inc, "Reset lasts one cycle");
    repeat (4) @(posedge clk);
    #1 check(!reset_inc && !pi_en, "quiet while the next search runs");

    // 6-bit search, Lock only arrives one edge after Stop (inside the settle time).
    @(negedge clk) begin width = SW6; stop = 1'b1; lock = 1'b0; end
    @(negedge clk) lock = 1'b1;
    e = 1;
    do begin @(posedge clk); #1; e++; end while (!pi_en && !reset_inc && e < 20);
    check(pi_en && !reset_inc, "Lock inside the settle time gives PI_EN");
    check(e == SETTLE + 1, $sformatf("PI_EN %0d edges after Stop (got %0d)", SETTLE + 1, e));
    repeat (10) @(posedge clk);
    #1 check(pi_en && !vsar_cm && !fail, "closed loop holds PI_EN");

    // Lost lock: the counter saturates.
    @(negedge clk) c_sat = 1'b1;
    @(posedge clk); #1;
    check(!pi_en && vsar_cm, "saturated counter drops PI_EN and restarts the VSAR");
    @(negedge clk) begin c_sat = 1'b0; stop = 1'b0; lock = 1'b0; end
    @(posedge clk); #1 check(!vsar_cm, "VSAR_CM lasts one cycle");

    // Re-search at 6 bits locks again.
    finish_search(SW6, 1'b1, e);
    check(pi_en && e == SETTLE + 1, "re-lock after the restart");
    @(negedge clk) stop = 1'b0;

    // New start: 7-bit search without lock -> Fail.
    @(negedge clk) rst_n = 1'b0;
    #100 rst_n = 1'b1;
    finish_search(SW7, 1'b0, e);
    check(fail && !reset_inc && !pi_en, "no lock at 7 bits gives Fail");
    check(e == SETTLE + 1, "Fail timing");
    @(negedge clk) lock = 1'b1;
    repeat (5) @(posedge clk);
    #1 check(fail && !pi_en && !reset_inc, "Fail is held");

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
