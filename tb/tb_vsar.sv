`timescale 1ps/1fs
// Self-checking test of the variable SAR.
//
// A reference model answers Comp = 1 while the code is at or below a target
// value, so a correct n-bit search must end exactly on the target (when it
// lies in range) or on all ones of the current width. Checked: the 5-bit
// trial sequence 16, 24, 28, 30, 31 for a target out of range; Stop exactly
// n+1 edges after the start; Reset clearing Q and widening to 6 and 7 bits
// (and saturating at 7); VSAR_CM restarting at the same width; random
// targets at every width.
module tb_vsar;
  import dll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic comp, reset_inc = 1'b0, restart = 1'b0;
  logic [Q_W-1:0] q;
  logic stop;
  sar_width_e width;
  int target = 0;
  int checks = 0, failures = 0;

  vsar dut (.*);

  always #2000 clk = ~clk;
  assign comp = (int'(q) <= target);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (q=%0d stop=%0d width=%0d target=%0d)", what, q, stop, width, target);
    end
  endtask

  // Runs one search from a just-(re)started VSAR and returns the edge count.
  task automatic run_search(input int tgt, input int n_bits, input bit check_seq,
                            input int seq[]);
    int edges = 0;
    int expect_q;
    target = tgt;
    @(posedge clk); #1;                 // arm edge: first trial code
    edges++;
    check(int'(q) == (1 << (n_bits - 1)), "first trial is the MSB of the width");
    while (!stop && edges < 20) begin
      if (check_seq && edges - 1 < seq.size())
        check(int'(q) == seq[edges-1], $sformatf("trial code %0d", edges - 1));
      @(posedge clk); #1;
      edges++;
    end
    check(edges == n_bits + 1, $sformatf("Stop after %0d edges (got %0d)", n_bits + 1, edges));
    expect_q = (tgt >= (1 << n_bits) - 1) ? (1 << n_bits) - 1 : tgt;
    check(int'(q) == expect_q, $sformatf("search result %0d", expect_q));
    repeat (3) @(posedge clk);
    #1 check(int'(q) == expect_q && stop, "result held after Stop");
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
    #1;
  endtask

  initial begin
    @(negedge clk) rst_n = 1'b0;
    #500 rst_n = 1'b1;
    check(q == '0 && !stop && width == SW5, "reset state");
    // 5-bit search, target out of range: 16, 24, 28, 30, 31.
    run_search(1000, 5, 1'b1, '{16, 24, 28, 30, 31});
    // Reset: clear and widen to 6 bits; target 52 gives 32, 48, 56, 52, 54, 53.
    pulse(reset_inc);
    check(q == '0 && !stop && width == SW6, "Reset clears Q and widens to 6 bits");
    run_search(52, 6, 1'b1, '{32, 48, 56, 52, 54, 53});
    // Restart at the same width.
    pulse(restart);
    check(q == '0 && width == SW6, "VSAR_CM restarts at the same width");
    run_search(7, 6, 1'b0, '{0});
    // 7 bits, then saturation of the width.
    pulse(reset_inc);
    check(width == SW7, "second Reset widens to 7 bits");
    run_search(100, 7, 1'b1, '{64, 96, 112, 104, 100, 102, 101});
    pulse(reset_inc);
    check(width == SW7, "width saturates at 7 bits");
    for (int i = 0; i < 20; i++) begin
      pulse(restart);
      run_search(int'($urandom_range(0, 127)), 7, 1'b0, '{0});
    end
    // Random targets at 5 and 6 bits after a fresh reset.
    for (int w = 5; w <= 6; w++) begin
      for (int i = 0; i < 10; i++) begin
        @(negedge clk) rst_n = 1'b0;
        #100 rst_n = 1'b1;
        if (w == 6) pulse(reset_inc);
        run_search(int'($urandom_range(0, (1 << w) + 4)), w, 1'b0, '{0});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2_000_000_000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
