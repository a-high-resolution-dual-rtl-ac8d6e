`timescale 1ps/1fs
// Self-checking test of the coarse phase detector (Comp and Lock).
//
// The output clock is the 250 MHz reference delayed by D; two window cells
// of W = 140 ps make the delayed copies the detector needs, as in the DLL.
// D is swept over two periods. Expected from the timing alone: Comp = 1 when
// D mod T lies in (T/2, T); Lock = 1 when the output edge lies within
// [-W, W) of a reference edge.
module tb_coarse_pd;
  localparam realtime T = 4000.0;
  localparam real     W = 140.0;
  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b1;
  logic ref_w, fb_w, comp, lock;
  realtime d = 0.0;
  int checks = 0, failures = 0, n_lock = 0;

  delay_cell #(.DELAY_PS(W)) u_wr (.in_i(ref_clk), .out(ref_w));
  delay_cell #(.DELAY_PS(W)) u_wf (.in_i(fb_clk),  .out(fb_w));
  coarse_pd dut (.*);

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
    if (comp !== 1'b0 || lock !== 1'b0) begin failures++; $display("FAIL: reset"); end
    for (int i = 1; i < 400; i++) begin
      real m, e;
      bit exp_c, exp_l;
      d = 20.0 * i + 3.0;
      m = d - T * $floor(d / T);
      e = (m > T / 2.0) ? m - T : m;     // edge position relative to the nearest ref edge
      exp_c = (m > T / 2.0);
      exp_l = (e >= -W) && (e < W);
      repeat (5) @(posedge ref_clk);
      #1;
      checks++;
      if (comp !== exp_c || lock !== exp_l) begin
        failures++;
        $display("FAIL: delay %0.1f ps: comp=%0d lock=%0d expected %0d %0d", d, comp, lock, exp_c, exp_l);
      end
      if (lock) n_lock++;
    end
    checks++;
    if (n_lock < 20) begin failures++; $display("FAIL: lock window never seen"); end
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
